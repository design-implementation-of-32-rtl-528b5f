// mips_control: main control unit of the single-cycle MIPS processor.
//
// Decodes the opcode, instruction bits [31:26], into the nine control signals
// RegDst, Jump, Branch, MemRead, MemtoReg, ALUOp (2 bits), MemWrite, ALUSrc and
// RegWrite. Purely combinational: the signals are valid in the same cycle as
// the instruction.
//
// The rows for R-type, lw, sw and beq follow the document's control table;
// where the table leaves a signal as "don't care" (RegDst and MemtoReg of sw
// and beq) this design drives 0. The jump row (only Jump set) and the addi row
// (as lw without the memory access) are this design's own, built from the
// meaning the document gives each signal. Any other opcode decodes to all
// zeros, so it changes no state and executes as a no-op.
module mips_control
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '0;
    ctrl.alu_op = ALUOP_ADD;
    unique case (opcode)
      OP_RTYPE: begin
        ctrl.reg_dst   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.alu_op    = ALUOP_FUNCT;
      end
      OP_LW: begin
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_write  = 1'b1;
        ctrl.mem_read   = 1'b1;
      end
      OP_SW: begin
        ctrl.alu_src   = 1'b1;
        ctrl.mem_write = 1'b1;
      end
      OP_BEQ: begin
        ctrl.branch = 1'b1;
        ctrl.alu_op = ALUOP_SUB;
      end
      OP_ADDI: begin
        ctrl.alu_src   = 1'b1;
        ctrl.reg_write = 1'b1;
      end
      OP_J: begin
        ctrl.jump = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
