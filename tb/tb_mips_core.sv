// tb_mips_core: self-checking testbench of the single-cycle processor.
//
// The processor runs the directed program from a testbench instruction array,
// with a testbench data memory on its data bus. Every cycle the PC, the store
// strobe, the store address and data, and (for add, sub and addi) the overflow
// flag are compared with the instruction-set reference model, which then
// executes the same instruction. Checks one instruction per clock cycle: the
// reference model advances exactly once per rising edge. Counts taken and not
// taken branches, jumps, loads, stores and overflows and fails if any of them
// never happened. Run for both the 8-bit default and, via parameter W, the
// 32-bit data path.
module tb_mips_core;
  import mips_tb_pkg::*;

  localparam int W = 8, PC_W = 8;

  logic            clk = 0, rst = 1;
  logic [PC_W-1:0] instadd;
  logic [31:0]     ir;
  logic [W-1:0]    dataadd, data_out, data_in;
  logic            memwr, memrd, overflow;
  int              checks = 0, failures = 0;
  int              n_taken = 0, n_not_taken = 0, n_jump = 0, n_load = 0, n_store = 0, n_ovf = 0;

  bit [31:0]  prog [64];
  bit [W-1:0] dm [256];
  word_q_t    q;
  mips_iss #(W, PC_W) iss;

  mips_core #(.W(W), .PC_W(PC_W)) dut (
    .clk_h(clk), .rst_h(rst), .instadd(instadd), .ir(ir), .dataadd(dataadd),
    .data_out(data_out), .data_in(data_in), .memwr(memwr), .memrd(memrd), .overflow(overflow)
  );

  always #5 clk = ~clk;

  assign ir      = prog[instadd[PC_W-1:2] % 64];
  assign data_in = memrd ? dm[dataadd] : '0;
  always @(posedge clk) if (memwr) dm[dataadd] <= data_out;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    q = directed_program(W);
    foreach (prog[i]) prog[i] = (i < q.size()) ? q[i] : 32'h0;
    foreach (dm[i]) dm[i] = '0;
    iss = new();
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int cyc = 0; cyc < 80; cyc++) begin
      @(negedge clk);
      check(instadd == iss.pc, $sformatf("pc %0h exp %0h", instadd, iss.pc));
      iss.step(ir);
      check(memwr == iss.st_valid, "store strobe");
      if (iss.st_valid) begin
        check(dataadd == iss.st_addr && data_out == iss.st_data,
              $sformatf("store %0h<-%0h exp %0h<-%0h", dataadd, data_out, iss.st_addr, iss.st_data));
        n_store++;
      end
      if (iss.is_arith) begin
        check(overflow == iss.ovf, "overflow flag");
        if (iss.ovf) n_ovf++;
      end
      if (iss.loaded) begin check(memrd == 1'b1, "load strobe"); n_load++; end
      n_taken += iss.br_taken; n_not_taken += iss.br_not_taken; n_jump += iss.jumped;
    end
    // Final results the program stored, worked out by hand.
    begin
      bit [W-1:0] exp [17];
      int B = W / 8;
      exp = '{W'(3), W'(2), W'(6), W'(12), W'(1), W'(0), W'(12), W'(6), W'(100), W'(93),
              W'(1) << (W - 1), W'(0), W'(4), W'(23), W'(2), W'(4), W'(26)};
      for (int k = 0; k < 17; k++)
        check(dm[('h40 + k * B) % 256] == exp[k], $sformatf("result r%0d = %0h exp %0h", k + 10, dm[('h40 + k * B) % 256], exp[k]));
    end
    check(n_taken > 0, "branch taken happened");
    check(n_not_taken > 0, "branch not taken happened");
    check(n_jump > 0, "jump happened");
    check(n_load > 0, "load happened");
    check(n_store > 0, "store happened");
    check(n_ovf > 0, "overflow happened");
    $display("taken=%0d not_taken=%0d jumps=%0d loads=%0d stores=%0d overflows=%0d",
             n_taken, n_not_taken, n_jump, n_load, n_store, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
