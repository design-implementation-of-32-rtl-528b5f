// mips_alu_control: ALU control of the execution unit.
//
// Combines the 2-bit ALUOp from the main control unit with the function field,
// instruction bits [5:0], into the ALU operation. ALUOp 00 selects add (load,
// store and addi address/immediate arithmetic), 01 selects subtract (beq
// compare), 10 lets the function field choose among add, sub, and, or, slt,
// sll and srl. Combinational.
//
// The ALUOp meanings follow the document's control table; the function-field
// decode is standard MIPS. An unknown function code or ALUOp 11 selects add,
// which is this design's own choice.
module mips_alu_control
  import mips_pkg::*;
(
  input  aluop_e     alu_op,
  input  logic [5:0] funct,
  output alu_ctrl_e  alu_ctrl
);

  always_comb begin
    unique case (alu_op)
      ALUOP_ADD: alu_ctrl = ALU_ADD;
      ALUOP_SUB: alu_ctrl = ALU_SUB;
      ALUOP_FUNCT: begin
        unique case (funct)
          FN_ADD:  alu_ctrl = ALU_ADD;
          FN_SUB:  alu_ctrl = ALU_SUB;
          FN_AND:  alu_ctrl = ALU_AND;
          FN_OR:   alu_ctrl = ALU_OR;
          FN_SLT:  alu_ctrl = ALU_SLT;
          FN_SLL:  alu_ctrl = ALU_SLL;
          FN_SRL:  alu_ctrl = ALU_SRL;
          default: alu_ctrl = ALU_ADD;
        endcase
      end
      default: alu_ctrl = ALU_ADD;
    endcase
  end

endmodule
