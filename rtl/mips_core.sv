// mips_core: single-cycle MIPS processor.
//
// Every instruction is fetched, decoded, executed, given its memory access and
// written back within one clock cycle. The PC drives instadd; the instruction
// memory answers on ir in the same cycle. The opcode goes to the main control
// unit, rs and rt index the register file, the ALU computes an address, a
// result or a compare, and for loads and stores the ALU result leaves on
// dataadd with the store data on data_out, memwr and memrd as the strobes; the
// load data comes back on data_in in the same cycle. On the next rising edge
// the register file takes the ALU result or the load data, and the PC takes
// PC+4, the branch target (beq taken) or the jump target.
//
// Instructions: add, sub, and, or, slt, sll, srl, addi, lw, sw, beq, j. All
// others execute as no-ops. overflow is the signed overflow of the current add
// or sub (including addi and address adds); it is a status pin only.
//
// Data width W and PC width PC_W default to 8, the document's reduced data
// path with full 32-bit instructions; W = 32 and PC_W = 32 give the full 32-bit
// processor. The port set (instruction address and instruction, data address,
// data in and out, memory write, overflow, clock and reset) follows the
// document's synthesized processor; memrd is added so that the data memory
// unit gets its MemRead signal. rst_h is synchronous and active high.
module mips_core
  import mips_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter int unsigned PC_W = 8
) (
  input  logic            clk_h,
  input  logic            rst_h,
  output logic [PC_W-1:0] instadd,
  input  logic [31:0]     ir,
  output logic [W-1:0]    dataadd,
  output logic [W-1:0]    data_out,
  input  logic [W-1:0]    data_in,
  output logic            memwr,
  output logic            memrd,
  output logic            overflow
);

  ctrl_t           ctrl;
  logic [PC_W-1:0] pc, pc_plus4, add_result;
  logic [W-1:0]    read_data1, read_data2, imm_ext, alu_result, write_data;
  logic            zero, branch_sel;
  logic [4:0]      write_reg;

  mips_control u_control (
    .opcode(ir[31:26]),
    .ctrl  (ctrl)
  );

  mips_ifetch #(.PC_W(PC_W)) u_ifetch (
    .clk        (clk_h),
    .rst        (rst_h),
    .instruction(ir),
    .branch     (ctrl.branch),
    .zero       (zero),
    .jump       (ctrl.jump),
    .add_result (add_result),
    .pc         (pc),
    .pc_plus4   (pc_plus4),
    .branch_sel (branch_sel)
  );

  mips_idecode #(.W(W)) u_idecode (
    .clk        (clk_h),
    .rst        (rst_h),
    .instruction(ir),
    .reg_write  (ctrl.reg_write),
    .mem_to_reg (ctrl.mem_to_reg),
    .write_reg  (write_reg),
    .alu_result (alu_result),
    .mem_data   (data_in),
    .read_data1 (read_data1),
    .read_data2 (read_data2),
    .imm_ext    (imm_ext),
    .write_data (write_data)
  );

  mips_execute #(.W(W), .PC_W(PC_W)) u_execute (
    .read_data1 (read_data1),
    .read_data2 (read_data2),
    .imm_ext    (imm_ext),
    .instruction(ir),
    .alu_op     (ctrl.alu_op),
    .alu_src    (ctrl.alu_src),
    .reg_dst    (ctrl.reg_dst),
    .pc_plus4   (pc_plus4),
    .alu_result (alu_result),
    .zero       (zero),
    .overflow   (overflow),
    .add_result (add_result),
    .write_reg  (write_reg)
  );

  assign instadd  = pc;
  assign dataadd  = alu_result;
  assign data_out = read_data2;
  assign memwr    = ctrl.mem_write & ~rst_h;
  assign memrd    = ctrl.mem_read;

  // A load and a store are never issued by the same instruction.
  assert property (@(posedge clk_h) disable iff (rst_h) !(memwr && memrd));

endmodule
