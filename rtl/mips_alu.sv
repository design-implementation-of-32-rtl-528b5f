// mips_alu: arithmetic logic unit of the execution unit.
//
// Computes and, or, add, sub, set-on-less-than (signed), and logical shifts
// left and right of operand b by the 5-bit shift amount, on W-bit operands.
// Outputs the result, a Zero flag (result equals zero, used by beq) and a
// signed Overflow flag for add and sub. Combinational.
//
// The operation list and the Zero output follow the document; the Overflow
// output is the OVERFLOW pin of the document's synthesized processor. Overflow
// is only reported here, it raises no exception: that is this design's choice.
module mips_alu
  import mips_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [4:0]   shamt,
  input  alu_ctrl_e    alu_ctrl,
  output logic [W-1:0] result,
  output logic         zero,
  output logic         overflow
);

  logic [W-1:0] sum, diff;

  assign sum  = a + b;
  assign diff = a - b;

  always_comb begin
    overflow = 1'b0;
    unique case (alu_ctrl)
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_ADD: begin
        result   = sum;
        overflow = (a[W-1] == b[W-1]) && (sum[W-1] != a[W-1]);
      end
      ALU_SUB: begin
        result   = diff;
        overflow = (a[W-1] != b[W-1]) && (diff[W-1] != a[W-1]);
      end
      ALU_SLT: result = W'($signed(a) < $signed(b));
      ALU_SLL: result = b << shamt;
      ALU_SRL: result = b >> shamt;
      default: result = sum;
    endcase
  end

  assign zero = (result == '0);

endmodule
