// mips_execute: execution unit.
//
// Contains the ALUSrc multiplexer (second ALU operand from register rt or from
// the immediate), the ALU control and the ALU, the branch-target adder
// PC+4 + (immediate << 2), and the RegDst multiplexer that picks the register
// to be written: rt (bits [20:16]) for loads and addi, rd (bits [15:11]) for
// R-type. All combinational. The immediate is treated as a signed W-bit number
// and extended to the PC width before the shift, so negative branch offsets
// go backwards.
//
// The units and their connections follow the document's execution unit; the
// shift amount input of the ALU (bits [10:6]) is added for sll and srl.
module mips_execute
  import mips_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter int unsigned PC_W = 8
) (
  input  logic [W-1:0]    read_data1,
  input  logic [W-1:0]    read_data2,
  input  logic [W-1:0]    imm_ext,
  input  logic [31:0]     instruction,
  input  aluop_e          alu_op,
  input  logic            alu_src,
  input  logic            reg_dst,
  input  logic [PC_W-1:0] pc_plus4,
  output logic [W-1:0]    alu_result,
  output logic            zero,
  output logic            overflow,
  output logic [PC_W-1:0] add_result,
  output logic [4:0]      write_reg
);

  alu_ctrl_e    alu_ctrl;
  logic [W-1:0] alu_b;
  logic [31:0]  imm_wide, offset_wide;

  assign alu_b = alu_src ? imm_ext : read_data2;

  mips_alu_control u_alu_control (
    .alu_op  (alu_op),
    .funct   (instruction[5:0]),
    .alu_ctrl(alu_ctrl)
  );

  mips_alu #(.W(W)) u_alu (
    .a       (read_data1),
    .b       (alu_b),
    .shamt   (instruction[10:6]),
    .alu_ctrl(alu_ctrl),
    .result  (alu_result),
    .zero    (zero),
    .overflow(overflow)
  );

  assign imm_wide    = 32'($signed(imm_ext));
  assign offset_wide = imm_wide << 2;
  assign add_result  = pc_plus4 + offset_wide[PC_W-1:0];

  assign write_reg = reg_dst ? instruction[15:11] : instruction[20:16];

endmodule
