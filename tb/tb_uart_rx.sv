// tb_uart_rx: self-checking testbench of the UART receiver.
//
// Sends random bytes as 8N1 frames (LSB first) with a bit time of CLKS_PER_BIT
// clocks and random idle gaps, and checks that each byte is delivered once with
// a one-cycle data_valid, within two bit times after the start of its stop
// bit. A frame with a low stop bit must raise frame_err and deliver no byte.
module tb_uart_rx;
  localparam int CPB = 16;
  logic clk = 0, rst = 1, rx = 1, valid, ferr;
  logic [7:0] data;
  int checks = 0, failures = 0, got = 0, errs = 0;
  byte unsigned expq[$];

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk(clk), .rst(rst), .rx(rx), .data(data), .data_valid(valid), .frame_err(ferr));

  always #5 clk = ~clk;

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic send(byte unsigned b, bit stop = 1);
    rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(posedge clk); end
    rx = stop; repeat (CPB) @(posedge clk);
    rx = 1; repeat (CPB) @(posedge clk);
  endtask

  always @(posedge clk) if (!rst) begin
    if (valid) begin
      got++;
      check(expq.size() > 0 && data == expq[0], $sformatf("byte %h", data));
      if (expq.size() > 0) void'(expq.pop_front());
    end
    if (ferr) errs++;
  end

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (4) @(posedge clk); rst = 0; repeat (4) @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      byte unsigned b = 8'($urandom);
      expq.push_back(b);
      send(b);
      repeat ($urandom_range(0, 20)) @(posedge clk);
      check(expq.size() == 0, "byte delivered in time");
    end
    send(8'h5A, 0);
    check(errs == 1, "framing error reported");
    check(got == 200, "byte count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
