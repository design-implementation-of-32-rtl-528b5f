// mips_pipeline_core: five-stage pipelined MIPS processor.
//
// The same datapath as the single-cycle processor, cut into the stages
// instruction fetch (IF), decode and register read (ID), execute (EX), memory
// access (MEM) and write-back (WB) by four pipeline registers IF/ID, ID/EX,
// EX/MEM and MEM/WB. Each register carries the data and the control signals an
// instruction still needs in later stages, so up to five instructions are in
// flight and one completes per cycle. The branch target and Zero are computed
// in EX; Branch AND Zero is formed in MEM and loads the PC with the target at
// the end of that cycle. The register file is written from WB.
//
// There is no forwarding, no hazard detection and no flushing: software must
// schedule the code. A register written by one instruction can be read by the
// fourth instruction after it (the register file returns the old value when it
// is written and read in the same cycle), and the three instructions after a
// beq are executed whether or not the branch is taken. j is not part of the
// pipelined datapath and executes as a no-op. Reset clears the pipeline
// registers to no-ops and the PC to 0.
//
// Ports and timing of the memory buses match mips_core: instadd/ir in IF,
// dataadd/data_out/memwr/memrd/data_in in MEM, all answering in the same cycle.
// overflow belongs to the instruction in EX. The stage split and the placement
// of each unit follow the document's pipelined datapath figure; the rules for
// dependent instructions and branches follow from it having no hazard logic.
module mips_pipeline_core
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

  typedef struct packed {
    logic [PC_W-1:0] pc_plus4;
    logic [31:0]     instr;
  } if_id_t;

  typedef struct packed {
    ctrl_t           ctrl;
    logic [PC_W-1:0] pc_plus4;
    logic [W-1:0]    read_data1;
    logic [W-1:0]    read_data2;
    logic [W-1:0]    imm;
    logic [31:0]     instr;
  } id_ex_t;

  typedef struct packed {
    logic            branch;
    logic            mem_read;
    logic            mem_write;
    logic            mem_to_reg;
    logic            reg_write;
    logic [PC_W-1:0] branch_target;
    logic            zero;
    logic [W-1:0]    alu_result;
    logic [W-1:0]    read_data2;
    logic [4:0]      write_reg;
  } ex_mem_t;

  typedef struct packed {
    logic         mem_to_reg;
    logic         reg_write;
    logic [W-1:0] mem_data;
    logic [W-1:0] alu_result;
    logic [4:0]   write_reg;
  } mem_wb_t;

  if_id_t  if_id;
  id_ex_t  id_ex;
  ex_mem_t ex_mem;
  mem_wb_t mem_wb;

  logic [PC_W-1:0] pc, pc_plus4, add_result;
  logic            pc_src, zero;
  ctrl_t           ctrl_id;
  logic [W-1:0]    rd1, rd2, imm, alu_result, wb_data;
  logic [4:0]      write_reg_ex;

  // IF
  assign pc_plus4 = pc + PC_W'(4);
  assign pc_src   = ex_mem.branch & ex_mem.zero;
  assign instadd  = pc;

  always_ff @(posedge clk_h) begin
    if (rst_h) pc <= '0;
    else       pc <= pc_src ? ex_mem.branch_target : pc_plus4;
  end

  // ID
  mips_control u_control (
    .opcode(if_id.instr[31:26]),
    .ctrl  (ctrl_id)
  );

  mips_idecode #(.W(W)) u_idecode (
    .clk        (clk_h),
    .rst        (rst_h),
    .instruction(if_id.instr),
    .reg_write  (mem_wb.reg_write),
    .mem_to_reg (mem_wb.mem_to_reg),
    .write_reg  (mem_wb.write_reg),
    .alu_result (mem_wb.alu_result),
    .mem_data   (mem_wb.mem_data),
    .read_data1 (rd1),
    .read_data2 (rd2),
    .imm_ext    (imm),
    .write_data (wb_data)
  );

  // EX
  mips_execute #(.W(W), .PC_W(PC_W)) u_execute (
    .read_data1 (id_ex.read_data1),
    .read_data2 (id_ex.read_data2),
    .imm_ext    (id_ex.imm),
    .instruction(id_ex.instr),
    .alu_op     (id_ex.ctrl.alu_op),
    .alu_src    (id_ex.ctrl.alu_src),
    .reg_dst    (id_ex.ctrl.reg_dst),
    .pc_plus4   (id_ex.pc_plus4),
    .alu_result (alu_result),
    .zero       (zero),
    .overflow   (overflow),
    .add_result (add_result),
    .write_reg  (write_reg_ex)
  );

  // MEM
  assign dataadd  = ex_mem.alu_result;
  assign data_out = ex_mem.read_data2;
  assign memwr    = ex_mem.mem_write & ~rst_h;
  assign memrd    = ex_mem.mem_read;

  // Pipeline registers.
  always_ff @(posedge clk_h) begin
    if (rst_h) begin
      if_id  <= '0;
      id_ex  <= '0;
      ex_mem <= '0;
      mem_wb <= '0;
    end else begin
      if_id.pc_plus4 <= pc_plus4;
      if_id.instr    <= ir;

      id_ex.ctrl       <= ctrl_id;
      id_ex.pc_plus4   <= if_id.pc_plus4;
      id_ex.read_data1 <= rd1;
      id_ex.read_data2 <= rd2;
      id_ex.imm        <= imm;
      id_ex.instr      <= if_id.instr;

      ex_mem.branch        <= id_ex.ctrl.branch;
      ex_mem.mem_read      <= id_ex.ctrl.mem_read;
      ex_mem.mem_write     <= id_ex.ctrl.mem_write;
      ex_mem.mem_to_reg    <= id_ex.ctrl.mem_to_reg;
      ex_mem.reg_write     <= id_ex.ctrl.reg_write;
      ex_mem.branch_target <= add_result;
      ex_mem.zero          <= zero;
      ex_mem.alu_result    <= alu_result;
      ex_mem.read_data2    <= id_ex.read_data2;
      ex_mem.write_reg     <= write_reg_ex;

      mem_wb.mem_to_reg <= ex_mem.mem_to_reg;
      mem_wb.reg_write  <= ex_mem.reg_write;
      mem_wb.mem_data   <= data_in;
      mem_wb.alu_result <= ex_mem.alu_result;
      mem_wb.write_reg  <= ex_mem.write_reg;
    end
  end

  // A load and a store are never issued by the same instruction.
  assert property (@(posedge clk_h) disable iff (rst_h) !(memwr && memrd));

endmodule
