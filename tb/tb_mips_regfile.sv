// tb_mips_regfile: self-checking testbench of the register file.
//
// Checks that reset loads every register with its own number (r0 reads 0),
// then runs random writes and reads against a testbench copy of the registers:
// writes take effect at the next rising edge, r0 ignores writes and always
// reads zero, and nothing changes while reg_write is low.
module tb_mips_regfile;
  localparam int W = 8;
  logic clk = 0, rst = 1, we = 0;
  logic [4:0] ra1 = 0, ra2 = 0, wa = 0;
  logic [W-1:0] wd = 0, rd1, rd2;
  logic [W-1:0] model [32];
  int checks = 0, failures = 0;

  mips_regfile #(.W(W), .NREGS(32)) dut (
    .clk(clk), .rst(rst), .read_reg1(ra1), .read_reg2(ra2), .write_reg(wa),
    .write_data(wd), .reg_write(we), .read_data1(rd1), .read_data2(rd2));

  always #5 clk = ~clk;

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 32; i++) begin
      model[i] = W'(i);
      ra1 = 5'(i); ra2 = 5'(31 - i); #1;
      check(rd1 == W'(i) && rd2 == W'(31 - i), $sformatf("reset value r%0d", i));
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 3) != 0);
      wa = 5'($urandom_range(0, 31));
      if (n % 50 == 0) wa = 0;
      wd = W'($urandom);
      ra1 = 5'($urandom_range(0, 31)); ra2 = 5'($urandom_range(0, 31));
      #1;
      check(rd1 == (ra1 == 0 ? '0 : model[ra1]), "read port 1");
      check(rd2 == (ra2 == 0 ? '0 : model[ra2]), "read port 2");
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
