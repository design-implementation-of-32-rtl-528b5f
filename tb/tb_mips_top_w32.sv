// tb_mips_top_w32: end-to-end testbench of the MIPS system with the full
// 32-bit data path and PC (DATA_W = PC_W = 32) and a short UART bit time.
// Otherwise identical to tb_mips_top:
//
// Plays the part of the host: assembles the directed program, sends it as 8N1
// serial frames at the top's default bit time while prog_mode is high, then
// lowers prog_mode and lets the processor run. Every cycle the PC, the store
// bus and (for add, sub and addi) the overflow flag are compared with the
// instruction-set reference model, which executes one instruction per clock.
// A second session then loads a random program of ALU instructions and stores
// over the first and runs it the same way, so run-time reloading is exercised.
// Counts loads over the serial line, branches taken and not taken, jumps,
// loads, stores, overflows and no-ops, and fails if one never happened.
module tb_mips_top_w32;
  import mips_tb_pkg::*;

  localparam int W = 32, PC_W = 32, CPB = 16;

  logic            clk = 0, rst = 1, prog_mode = 0, uart_rx = 1;
  logic [6:0]      words_loaded;
  logic [PC_W-1:0] pc;
  logic [31:0]     instruction;
  logic [W-1:0]    data_addr, data_wdata;
  logic            data_we, overflow;
  int checks = 0, failures = 0;
  int n_sessions = 0, n_taken = 0, n_not_taken = 0, n_jump = 0, n_load = 0, n_store = 0,
      n_ovf = 0, n_nop = 0;
  mips_iss #(W, PC_W) iss;

  mips_top #(.DATA_W(W), .PC_W(PC_W), .IMEM_DEPTH(64), .DMEM_DEPTH(256), .CLKS_PER_BIT(CPB)) dut (
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

  task automatic load(word_q_t p);
    @(negedge clk); prog_mode = 1;
    repeat (10) @(posedge clk);
    foreach (p[i]) for (int k = 3; k >= 0; k--) send_byte(p[i][8*k +: 8]);
    repeat (5) @(posedge clk);
    check(int'(words_loaded) == p.size(), $sformatf("words loaded %0d exp %0d", words_loaded, p.size()));
    if (int'(words_loaded) == p.size()) n_sessions++;
    @(negedge clk); prog_mode = 0;
  endtask

  task automatic run(int cycles);
    iss.reset();
    for (int c = 0; c < cycles; c++) begin
      if (c > 0) @(negedge clk);
      #1;
      check(pc == iss.pc, $sformatf("pc %h exp %h", pc, iss.pc));
      if (instruction[31:26] == 6'h3F) n_nop++;
      iss.step(instruction);
      check(data_we == iss.st_valid, "store strobe");
      if (iss.st_valid) begin
        check(data_addr == iss.st_addr && data_wdata == iss.st_data,
              $sformatf("store %h<-%h exp %h<-%h", data_addr, data_wdata, iss.st_addr, iss.st_data));
        n_store++;
      end
      if (iss.is_arith) begin check(overflow == iss.ovf, "overflow"); n_ovf += iss.ovf; end
      n_load += iss.loaded; n_taken += iss.br_taken; n_not_taken += iss.br_not_taken;
      n_jump += iss.jumped;
    end
  endtask

  function automatic word_q_t random_program();
    word_q_t p;
    bit [5:0] fns [7] = '{FC_ADD, FC_SUB, FC_AND, FC_OR, FC_SLT, FC_SLL, FC_SRL};
    for (int i = 0; i < 40; i++) begin
      int rd = $urandom_range(1, 15), rs = $urandom_range(0, 15), rt = $urandom_range(0, 15);
      if ($urandom_range(0, 3) == 0) p.push_back(asm_i(OPC_ADDI, rd, rs, $urandom_range(0, 255) - 128));
      else p.push_back(asm_r(fns[$urandom_range(0, 6)], rd, rs, rt, $urandom_range(0, W - 1)));
    end
    for (int k = 1; k <= 15; k++) p.push_back(asm_i(OPC_SW, k, 0, 'h80 + k * (W / 8)));
    p.push_back(asm_j(p.size()));
    return p;
  endfunction

  initial begin
    #100ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    iss = new();
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 0;
    load(directed_program(W));
    run(100);
    load(random_program());
    run(70);
    check(n_sessions == 2, "program loaded over the serial line twice");
    check(n_taken > 0, "branch taken happened");
    check(n_not_taken > 0, "branch not taken happened");
    check(n_jump > 0, "jump happened");
    check(n_load > 0, "load happened");
    check(n_store > 0, "store happened");
    check(n_ovf > 0, "overflow happened");
    check(n_nop > 0, "unknown opcode executed as no-op");
    $display("sessions=%0d taken=%0d not_taken=%0d jumps=%0d loads=%0d stores=%0d overflows=%0d nops=%0d",
             n_sessions, n_taken, n_not_taken, n_jump, n_load, n_store, n_ovf, n_nop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
