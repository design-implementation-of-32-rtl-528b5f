// tb_mips_alu: self-checking testbench of the ALU control and the ALU.
//
// Drives random operands, shift amounts, ALUOp values and function codes into
// the ALU control, whose output selects the ALU operation, and compares the
// result, Zero and Overflow with values computed in the testbench with wide
// signed arithmetic. Directed cases cover zero results and both overflow
// directions.
module tb_mips_alu;
  import mips_pkg::*;
  localparam int W = 8;
  logic [W-1:0] a, b, res;
  logic [4:0] shamt;
  logic [5:0] funct;
  aluop_e alu_op;
  alu_ctrl_e alu_ctrl;
  logic zero, ovf;
  int checks = 0, failures = 0, n_ovf = 0, n_zero = 0;

  mips_alu_control u_ctl (.alu_op(alu_op), .funct(funct), .alu_ctrl(alu_ctrl));
  mips_alu #(.W(W)) dut (.a(a), .b(b), .shamt(shamt), .alu_ctrl(alu_ctrl),
                         .result(res), .zero(zero), .overflow(ovf));

  localparam logic [5:0] FUNCTS [8] = '{6'h20, 6'h22, 6'h24, 6'h25, 6'h2A, 6'h00, 6'h02, 6'h3F};

  task automatic apply_and_check();
    longint sa, sb, full;
    logic [W-1:0] e;
    logic eo;
    #1;
    sa = longint'($signed(a)); sb = longint'($signed(b));
    eo = 0;
    if (alu_op == ALUOP_ADD || (alu_op == ALUOP_FUNCT && (funct == 6'h20 || funct == 6'h3F))) begin
      full = sa + sb; e = W'(full); eo = (full > 127 || full < -128);
    end else if (alu_op == ALUOP_SUB || (alu_op == ALUOP_FUNCT && funct == 6'h22)) begin
      full = sa - sb; e = W'(full); eo = (full > 127 || full < -128);
    end else case (funct)
      6'h24: e = a & b;
      6'h25: e = a | b;
      6'h2A: e = (sa < sb) ? 1 : 0;
      6'h00: e = W'(longint'(b) << shamt);
      default: e = W'(longint'(b) >> shamt);
    endcase
    checks++;
    if (res !== e || zero !== (e == 0) || ovf !== eo) begin
      failures++;
      if (failures < 10) $display("FAIL op=%0d fn=%h a=%h b=%h sh=%0d: got %h z%b o%b exp %h o%b",
                                  alu_op, funct, a, b, shamt, res, zero, ovf, e, eo);
    end
    n_ovf += eo; n_zero += (e == 0);
  endtask

  initial begin
    // Directed: zero, positive and negative overflow.
    alu_op = ALUOP_SUB; funct = 0; shamt = 0; a = 8'd42; b = 8'd42; apply_and_check();
    alu_op = ALUOP_ADD; a = 8'd100; b = 8'd100; apply_and_check();
    alu_op = ALUOP_SUB; a = 8'h80; b = 8'd1; apply_and_check();
    alu_op = ALUOP_FUNCT; funct = 6'h2A; a = 8'hFF; b = 8'd1; apply_and_check();
    for (int n = 0; n < 5000; n++) begin
      a = W'($urandom); b = W'($urandom); shamt = 5'($urandom_range(0, 9));
      if (n % 7 == 0) b = a;
      alu_op = aluop_e'($urandom_range(0, 2));
      funct = FUNCTS[$urandom_range(0, 7)];
      apply_and_check();
    end
    checks++; if (n_ovf == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
