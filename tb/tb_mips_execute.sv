// tb_mips_execute: self-checking testbench of the execution unit.
//
// Drives random register values, immediates, instructions and control signals
// and checks the ALU operand selection (ALUSrc), the ALU result and Zero flag,
// the branch target PC+4 + (immediate << 2) with signed immediates, and the
// RegDst choice of the register to write.
module tb_mips_execute;
  import mips_pkg::*;
  localparam int W = 8, PC_W = 8;
  logic [W-1:0] rd1, rd2, imm, res;
  logic [31:0] instr;
  aluop_e alu_op;
  logic alu_src, reg_dst, zero, ovf;
  logic [PC_W-1:0] pc4, target;
  logic [4:0] wreg;
  int checks = 0, failures = 0;

  mips_execute #(.W(W), .PC_W(PC_W)) dut (
    .read_data1(rd1), .read_data2(rd2), .imm_ext(imm), .instruction(instr), .alu_op(alu_op),
    .alu_src(alu_src), .reg_dst(reg_dst), .pc_plus4(pc4), .alu_result(res), .zero(zero),
    .overflow(ovf), .add_result(target), .write_reg(wreg));

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [W-1:0] b, e;
      rd1 = W'($urandom); rd2 = W'($urandom); imm = W'($urandom);
      instr = $urandom; alu_src = 1'($urandom); reg_dst = 1'($urandom);
      pc4 = PC_W'($urandom) & ~PC_W'(3);
      alu_op = ($urandom_range(0, 1) == 0) ? ALUOP_ADD : ALUOP_SUB;
      if (n % 3 == 0) begin
        alu_op = ALUOP_FUNCT; instr[5:0] = ($urandom_range(0, 1) == 0) ? 6'h24 : 6'h25;
      end
      if (n % 11 == 0) begin rd2 = rd1; alu_src = 0; alu_op = ALUOP_SUB; end
      #1;
      b = alu_src ? imm : rd2;
      if (alu_op == ALUOP_ADD) e = rd1 + b;
      else if (alu_op == ALUOP_SUB) e = rd1 - b;
      else e = (instr[5:0] == 6'h24) ? (rd1 & b) : (rd1 | b);
      check(res == e, $sformatf("alu result %h exp %h", res, e));
      check(zero == (e == 0), "zero");
      check(target == PC_W'(int'(pc4) + 4 * int'($signed(imm))), "branch target");
      check(wreg == (reg_dst ? instr[15:11] : instr[20:16]), "RegDst mux");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
