// tb_mips_dmem: self-checking testbench of the data memory unit.
//
// Writes every address once, then mixes random stores and loads, comparing
// each load with a testbench copy of the memory. Checks that a store is seen
// by a load after the next rising edge, that read_data is 0 while MemRead is
// low, and that nothing is written while MemWrite is low.
module tb_mips_dmem;
  localparam int W = 8, DEPTH = 256;
  logic clk = 0, rd = 0, wr = 0;
  logic [W-1:0] addr = 0, wdata = 0, rdata;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  mips_dmem #(.W(W), .DEPTH(DEPTH)) dut (
    .clk(clk), .address(addr), .write_data(wdata), .mem_read(rd), .mem_write(wr), .read_data(rdata));

  always #5 clk = ~clk;

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); addr = W'(i); wdata = W'($urandom); wr = 1; model[i] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      addr = W'($urandom); wdata = W'($urandom);
      wr = ($urandom_range(0, 2) == 0); rd = 1'($urandom);
      #1;
      check(rdata == (rd ? model[addr] : '0), $sformatf("read %h: %h exp %h", addr, rdata, model[addr]));
      @(posedge clk);
      if (wr) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
