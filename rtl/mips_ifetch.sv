// mips_ifetch: instruction fetch unit.
//
// Holds the program counter (a byte address of PC_W bits), adds 4 to it, and
// chooses the next PC with two multiplexers: the first picks the branch target
// (add_result) over PC+4 when Branch AND Zero is true, the second picks the jump
// target over the first mux's output when Jump is set. The PC is loaded on every
// rising clock edge and cleared to 0 while rst is high. The instruction memory
// is read outside this unit at address pc; the instruction comes back on
// `instruction` in the same cycle, and its bits [25:0] form the jump target
// {PC+4[31:28], instruction[25:0], 00}, cut to PC_W bits.
//
// The PC register, +4 adder, the two muxes and the AND gate follow the
// document's fetch unit, and the 8-bit default PC width is the document's. The
// jump target formula is the standard MIPS one; the synchronous reset to 0 is
// this design's choice.
module mips_ifetch #(
  parameter int unsigned PC_W = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [31:0]     instruction,
  input  logic            branch,
  input  logic            zero,
  input  logic            jump,
  input  logic [PC_W-1:0] add_result,
  output logic [PC_W-1:0] pc,
  output logic [PC_W-1:0] pc_plus4,
  output logic            branch_sel
);

  logic [31:0]     pc4_wide, jump_wide;
  logic [PC_W-1:0] jump_addr, next_pc, pc_next;

  assign pc_plus4   = pc + PC_W'(4);
  assign branch_sel = branch & zero;

  assign pc4_wide  = 32'(pc_plus4);
  assign jump_wide = {pc4_wide[31:28], instruction[25:0], 2'b00};
  assign jump_addr = jump_wide[PC_W-1:0];

  assign next_pc = branch_sel ? add_result : pc_plus4;
  assign pc_next = jump ? jump_addr : next_pc;

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= pc_next;
  end

endmodule
