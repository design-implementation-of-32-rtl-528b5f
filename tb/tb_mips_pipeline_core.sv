// tb_mips_pipeline_core: self-checking testbench of the pipelined processor.
//
// Runs the directed program, scheduled for a pipeline without hazard logic
// (no-ops between dependent instructions and after branches), from a
// testbench instruction array with a testbench data memory. The reference
// model executes the program in order and notes for each instruction the fetch
// slot it occupies (one slot per instruction, plus three delay slots after a
// taken branch). The testbench then requires each store on the data bus in
// exactly cycle slot + 3 (MEM stage) with the model's address and data, no
// store in any other cycle, the overflow flag of each add, sub and addi in
// cycle slot + 2 (EX stage), and the PC in each cycle to be the model's fetch
// address. Finally the stored results are compared with hand-worked values.
module tb_mips_pipeline_core;
  import mips_tb_pkg::*;

  localparam int W = 8, PC_W = 10, DEPTH = 256;

  logic            clk = 0, rst = 1;
  logic [PC_W-1:0] instadd;
  logic [31:0]     ir;
  logic [W-1:0]    dataadd, data_out, data_in;
  logic            memwr, memrd, overflow;
  int              checks = 0, failures = 0;
  int              n_taken = 0, n_load = 0, n_store = 0, n_ovf = 0, last_cycle = 0;

  bit [31:0]  prog [DEPTH];
  bit [W-1:0] dm [256];
  word_q_t    q;
  mips_iss #(W, PC_W) iss;
  bit [W-1:0]    st_addr_at [int];
  bit [W-1:0]    st_data_at [int];
  bit            ovf_at [int];
  bit [PC_W-1:0] pc_at [int];

  mips_pipeline_core #(.W(W), .PC_W(PC_W)) dut (
    .clk_h(clk), .rst_h(rst), .instadd(instadd), .ir(ir), .dataadd(dataadd),
    .data_out(data_out), .data_in(data_in), .memwr(memwr), .memrd(memrd), .overflow(overflow)
  );

  always #5 clk = ~clk;

  assign ir      = prog[instadd[PC_W-1:2]];
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
    int slot = 0;
    q = schedule_for_pipeline(directed_program(W));
    foreach (prog[i]) prog[i] = (i < q.size()) ? q[i] : 32'h0;
    foreach (dm[i]) dm[i] = '0;
    // Reference run: fetch slots and expected bus events.
    iss = new();
    for (int n = 0; n < 200; n++) begin
      bit [31:0] ins;
      ins = prog[iss.pc[PC_W-1:2]];
      pc_at[slot] = iss.pc;
      iss.step(ins);
      if (iss.st_valid) begin st_addr_at[slot + 3] = iss.st_addr; st_data_at[slot + 3] = iss.st_data; end
      if (iss.is_arith) ovf_at[slot + 2] = iss.ovf;
      if (iss.br_taken) begin
        for (int d = 1; d <= 3; d++) pc_at[slot + d] = pc_at[slot] + PC_W'(4 * d);
        slot += 3;
        n_taken++;
      end
      n_load += iss.loaded;
      slot++;
      if (iss.st_valid) last_cycle = slot + 3;
    end
    $display("scheduled program: %0d words, last store in cycle %0d", q.size(), last_cycle - 1);
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int cyc = 0; cyc < last_cycle + 5; cyc++) begin
      @(negedge clk);
      if (pc_at.exists(cyc)) check(instadd == pc_at[cyc], $sformatf("cycle %0d pc %h exp %h", cyc, instadd, pc_at[cyc]));
      check(memwr == st_addr_at.exists(cyc), $sformatf("cycle %0d store strobe %b", cyc, memwr));
      if (memwr && st_addr_at.exists(cyc)) begin
        check(dataadd == st_addr_at[cyc] && data_out == st_data_at[cyc],
              $sformatf("store %h<-%h exp %h<-%h", dataadd, data_out, st_addr_at[cyc], st_data_at[cyc]));
        n_store++;
      end
      if (ovf_at.exists(cyc)) begin
        check(overflow == ovf_at[cyc], $sformatf("cycle %0d overflow", cyc));
        n_ovf += overflow;
      end
    end
    begin
      bit [W-1:0] exp [17];
      exp = '{W'(3), W'(2), W'(6), W'(12), W'(1), W'(0), W'(12), W'(6), W'(100), W'(93),
              W'(1) << (W - 1), W'(0), W'(4), W'(23), W'(2), W'(4), W'(26)};
      for (int k = 0; k < 17; k++)
        check(dm['h40 + k] == exp[k], $sformatf("result r%0d = %0h exp %0h", k + 10, dm['h40 + k], exp[k]));
    end
    check(n_taken > 0, "taken branch happened");
    check(n_load > 0, "load happened");
    check(n_store > 0, "store happened");
    check(n_ovf > 0, "overflow happened");
    $display("taken=%0d loads=%0d stores=%0d overflows=%0d", n_taken, n_load, n_store, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
