// tb_mips_uart_loader: self-checking testbench of the program loader.
//
// Feeds byte strobes directly (no serial line) while prog_mode is high and
// checks that every fourth byte produces one instruction-memory write of the
// four bytes, most significant first, at consecutive word addresses from 0,
// and that words_loaded counts them. Bytes outside prog_mode must write
// nothing, and a second session must start again at address 0.
module tb_mips_uart_loader;
  localparam int DEPTH = 64;
  logic clk = 0, rst = 1, prog = 0, rxv = 0, we;
  logic [7:0] rxd = 0;
  logic [5:0] waddr;
  logic [31:0] wdata;
  logic [6:0] nwords;
  int checks = 0, failures = 0, writes = 0, exp_addr = 0;
  logic [31:0] expq[$];

  mips_uart_loader #(.IMEM_DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst), .prog_mode(prog), .rx_data(rxd), .rx_valid(rxv),
    .imem_we(we), .imem_waddr(waddr), .imem_wdata(wdata), .words_loaded(nwords));

  always #5 clk = ~clk;

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  always @(posedge clk) if (we && !rst) begin
    writes++;
    check(expq.size() > 0 && wdata == expq[0], $sformatf("word %h", wdata));
    check(int'(waddr) == exp_addr, $sformatf("address %0d exp %0d", waddr, exp_addr));
    exp_addr++;
    if (expq.size() > 0) void'(expq.pop_front());
  end

  task automatic send_byte(logic [7:0] b);
    @(negedge clk); rxd = b; rxv = 1; @(negedge clk); rxv = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  task automatic session(int nw);
    @(negedge clk); prog = 1; exp_addr = 0;
    for (int w = 0; w < nw; w++) begin
      logic [31:0] word = $urandom;
      expq.push_back(word);
      for (int k = 3; k >= 0; k--) send_byte(word[8*k +: 8]);
    end
    repeat (3) @(negedge clk);
    check(int'(nwords) == nw, $sformatf("words_loaded %0d exp %0d", nwords, nw));
    prog = 0;
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    send_byte(8'hAA); send_byte(8'hBB); send_byte(8'hCC); send_byte(8'hDD);
    check(writes == 0, "no write outside prog_mode");
    session(10);
    session(5);
    check(writes == 15 && expq.size() == 0, "all words written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
