// tb_mips_top_pipe: end-to-end testbench of the system with the pipelined
// processor (PIPELINED = 1).
//
// Loads the directed program, scheduled for the pipeline, over the serial
// line (short bit time, 10-bit PC and 256-word instruction memory so the
// scheduled program fits), releases prog_mode and runs it. Each store on the
// data bus must match, in order, the stores of the in-order reference model,
// and the first store must come exactly three cycles after its instruction was
// fetched (the MEM stage). Finally checks the number of words loaded and that
// every expected store was seen.
module tb_mips_top_pipe;
  import mips_tb_pkg::*;

  localparam int W = 8, PC_W = 10, CPB = 16, IMEM = 256;

  logic            clk = 0, rst = 1, prog_mode = 0, uart_rx = 1;
  logic [8:0]      words_loaded;
  logic [PC_W-1:0] pc;
  logic [31:0]     instruction;
  logic [W-1:0]    data_addr, data_wdata;
  logic            data_we, overflow;
  int checks = 0, failures = 0, n_store = 0, n_ovf = 0;
  bit [31:0] prog [IMEM];
  word_q_t q;
  mips_iss #(W, PC_W) iss;
  bit [W-1:0] exp_addr [$], exp_data [$];
  bit [PC_W-1:0] exp_pc [$];
  bit [PC_W-1:0] fetched [int];

  mips_top #(.DATA_W(W), .PC_W(PC_W), .IMEM_DEPTH(IMEM), .DMEM_DEPTH(256),
             .CLKS_PER_BIT(CPB), .PIPELINED(1'b1)) dut (
    .clk(clk), .rst(rst), .prog_mode(prog_mode), .uart_rx(uart_rx), .words_loaded(words_loaded),
    .pc(pc), .instruction(instruction), .data_addr(data_addr), .data_wdata(data_wdata),
    .data_we(data_we), .overflow(overflow));

  always #10 clk = ~clk;

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s at t=%0t", s, $time); end
  endtask

  task automatic send_byte(logic [7:0] b);
    uart_rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rx = b[i]; repeat (CPB) @(posedge clk); end
    uart_rx = 1; repeat (CPB) @(posedge clk);
  endtask

  initial begin
    #50ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    q = schedule_for_pipeline(directed_program(W));
    foreach (prog[i]) prog[i] = (i < q.size()) ? q[i] : 32'h0;
    iss = new();
    for (int n = 0; n < 120; n++) begin
      iss.step(prog[iss.pc[PC_W-1:2]]);
      if (iss.st_valid) begin
        exp_addr.push_back(iss.st_addr); exp_data.push_back(iss.st_data); exp_pc.push_back(iss.st_pc);
      end
      n_ovf += iss.ovf;
    end
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk) prog_mode = 1;
    repeat (4) @(posedge clk);
    foreach (q[i]) for (int k = 3; k >= 0; k--) send_byte(q[i][8*k +: 8]);
    repeat (5) @(posedge clk);
    check(int'(words_loaded) == q.size(), "words loaded");
    @(negedge clk) prog_mode = 0;
    for (int c = 0; c < 400 && exp_addr.size() > 0; c++) begin
      #1;
      fetched[c] = pc;
      if (data_we) begin
        check(data_addr == exp_addr[0] && data_wdata == exp_data[0],
              $sformatf("store %h<-%h exp %h<-%h", data_addr, data_wdata, exp_addr[0], exp_data[0]));
        if (n_store == 0) check(c >= 3 && fetched[c - 3] == exp_pc[0], "first store three cycles after its fetch");
        n_store++;
        void'(exp_addr.pop_front()); void'(exp_data.pop_front()); void'(exp_pc.pop_front());
      end
      @(negedge clk);
    end
    check(exp_addr.size() == 0 && n_store > 0, "all stores seen");
    check(n_ovf > 0, "program contains an overflow");
    $display("stores=%0d", n_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
