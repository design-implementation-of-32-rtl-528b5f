// mips_pkg: types and constants shared by the single-cycle MIPS processor.
//
// Holds the opcodes and function codes the processor decodes, the 2-bit ALUOp that the main control
// unit passes to the ALU control, the 4-bit operation code that the ALU control
// passes to the ALU, and the bundle of nine main control signals.
//
// The opcodes, function codes and the four ALUOp/ALU-control operations (and,
// or, add, sub, slt) are the standard MIPS-I values. The codes for the two
// shift operations (sll, srl) are this design's own choice.
package mips_pkg;

  // Opcodes, instruction bits [31:26].
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_J     = 6'h02,
    OP_BEQ   = 6'h04,
    OP_ADDI  = 6'h08,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2B
  } opcode_e;

  // Function codes of R-type instructions, instruction bits [5:0].
  localparam logic [5:0] FN_SLL = 6'h00;
  localparam logic [5:0] FN_SRL = 6'h02;
  localparam logic [5:0] FN_ADD = 6'h20;
  localparam logic [5:0] FN_SUB = 6'h22;
  localparam logic [5:0] FN_AND = 6'h24;
  localparam logic [5:0] FN_OR  = 6'h25;
  localparam logic [5:0] FN_SLT = 6'h2A;

  // ALUOp from the main control unit (Table 1 columns ALUOp1, ALUOp0).
  typedef enum logic [1:0] {
    ALUOP_ADD   = 2'b00,   // lw, sw, addi: address / immediate add
    ALUOP_SUB   = 2'b01,   // beq: compare by subtraction
    ALUOP_FUNCT = 2'b10    // R-type: operation given by the function field
  } aluop_e;

  // Operation selected by the ALU control.
  typedef enum logic [3:0] {
    ALU_AND = 4'b0000,
    ALU_OR  = 4'b0001,
    ALU_ADD = 4'b0010,
    ALU_SUB = 4'b0110,
    ALU_SLT = 4'b0111,
    ALU_SLL = 4'b1000,
    ALU_SRL = 4'b1001
  } alu_ctrl_e;

  // The nine control signals of the main control unit.
  typedef struct packed {
    logic   reg_dst;     // 1: write register is rd, 0: rt
    logic   jump;        // select the jump target as next PC
    logic   branch;      // branch instruction (taken when ALU zero)
    logic   mem_read;    // data memory read
    logic   mem_to_reg;  // 1: write back memory data, 0: ALU result
    aluop_e alu_op;      // class of ALU operation
    logic   mem_write;   // data memory write
    logic   alu_src;     // 1: second ALU operand is the immediate
    logic   reg_write;   // register file write
  } ctrl_t;

endpackage
