// tb_mips_imem: self-checking testbench of the instruction memory.
//
// Fills all words through the write port with random values, then reads them
// back through the PC port at every byte address: the four byte addresses of
// a word must all return that word. Finally overwrites random words and
// checks that only those change.
module tb_mips_imem;
  localparam int PC_W = 8, DEPTH = 64;
  logic clk = 0, we = 0;
  logic [PC_W-1:0] pc = 0;
  logic [5:0] waddr = 0;
  logic [31:0] wdata = 0, instr;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  mips_imem #(.PC_W(PC_W), .DEPTH(DEPTH)) dut (
    .clk(clk), .pc(pc), .instruction(instr), .write_en(we), .write_addr(waddr), .write_data(wdata));

  always #5 clk = ~clk;

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic read_all();
    we = 0;
    for (int a = 0; a < 256; a++) begin
      pc = PC_W'(a); #1;
      check(instr == model[a / 4], $sformatf("pc %h: %h exp %h", pc, instr, model[a / 4]));
    end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); read_all();
    for (int n = 0; n < 20; n++) begin
      @(negedge clk); we = 1; waddr = 6'($urandom); wdata = $urandom; model[waddr] = wdata;
    end
    @(negedge clk); read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
