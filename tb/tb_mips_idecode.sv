// tb_mips_idecode: self-checking testbench of the instruction decode unit.
//
// Random instructions select rs and rt; the testbench keeps its own register
// copy and checks both read values, the immediate (low 8 bits of the
// instruction for the 8-bit data path), and the write-back path: the ALU result
// or the memory data, chosen by MemtoReg, written to write_reg at the next edge
// when RegWrite is set.
module tb_mips_idecode;
  localparam int W = 8;
  logic clk = 0, rst = 1, reg_write = 0, mem_to_reg = 0;
  logic [31:0] instr = 0;
  logic [4:0] wreg = 0;
  logic [W-1:0] alu_res = 0, mem_data = 0, rd1, rd2, imm, wdata;
  logic [W-1:0] model [32];
  int checks = 0, failures = 0;

  mips_idecode #(.W(W)) dut (
    .clk(clk), .rst(rst), .instruction(instr), .reg_write(reg_write), .mem_to_reg(mem_to_reg),
    .write_reg(wreg), .alu_result(alu_res), .mem_data(mem_data), .read_data1(rd1),
    .read_data2(rd2), .imm_ext(imm), .write_data(wdata));

  always #5 clk = ~clk;

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (model[i]) model[i] = W'(i);
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      instr = $urandom; reg_write = 1'($urandom); mem_to_reg = 1'($urandom);
      wreg = 5'($urandom); alu_res = W'($urandom); mem_data = W'($urandom);
      #1;
      check(rd1 == (instr[25:21] == 0 ? '0 : model[instr[25:21]]), "rs read");
      check(rd2 == (instr[20:16] == 0 ? '0 : model[instr[20:16]]), "rt read");
      check(imm == instr[7:0], "immediate");
      check(wdata == (mem_to_reg ? mem_data : alu_res), "write-back mux");
      @(posedge clk);
      if (reg_write && wreg != 0) model[wreg] = mem_to_reg ? mem_data : alu_res;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
