// tb_mips_ifetch: self-checking testbench of the instruction fetch unit.
//
// Drives random Branch, Zero, Jump, branch targets and jump fields each cycle
// and checks PC+4, Branch AND Zero, and the PC loaded at the next rising edge
// against a next-PC computed in the testbench: the jump target when Jump is
// set, else the branch target when Branch and Zero are both set, else PC+4.
module tb_mips_ifetch;
  localparam int PC_W = 8;
  logic clk = 0, rst = 1, branch = 0, zero = 0, jump = 0, bsel;
  logic [31:0] instr = 0;
  logic [PC_W-1:0] add_result = 0, pc, pc4, exp_pc;
  int checks = 0, failures = 0, n_br = 0, n_j = 0;

  mips_ifetch #(.PC_W(PC_W)) dut (
    .clk(clk), .rst(rst), .instruction(instr), .branch(branch), .zero(zero), .jump(jump),
    .add_result(add_result), .pc(pc), .pc_plus4(pc4), .branch_sel(bsel));

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
    check(pc == 0, "reset PC");
    exp_pc = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      branch = 1'($urandom); zero = 1'($urandom); jump = ($urandom_range(0, 4) == 0);
      add_result = PC_W'($urandom) & ~PC_W'(3);
      instr = $urandom;
      #1;
      check(pc == exp_pc, $sformatf("pc %h exp %h", pc, exp_pc));
      check(pc4 == PC_W'(exp_pc + 4), "pc+4");
      check(bsel == (branch & zero), "branch select");
      if (jump) begin exp_pc = PC_W'({instr[25:0], 2'b00}); n_j++; end
      else if (branch && zero) begin exp_pc = add_result; n_br++; end
      else exp_pc = PC_W'(exp_pc + 4);
    end
    check(n_j > 0 && n_br > 0, "jump and branch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
