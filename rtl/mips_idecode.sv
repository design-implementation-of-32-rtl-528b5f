// mips_idecode: instruction decode unit.
//
// Reads the two source registers rs (bits [25:21]) and rt (bits [20:16]) from
// the register file, forms the immediate operand, and writes back the result of
// the previous stage: the write-back multiplexer picks the data memory output
// when MemtoReg is set and the ALU result otherwise, and the register file
// stores it at write_reg on the next rising edge when RegWrite is set.
//
// Immediate: with a data width of 16 bits or more, bits [15:0] are sign
// extended to W bits. With a narrower data path, as in the 8-bit default, the
// low W bits of the instruction are used directly without extension, as the
// document does for its 8-bit processor. Combinational except for the register
// file.
module mips_idecode #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [31:0]  instruction,
  input  logic         reg_write,
  input  logic         mem_to_reg,
  input  logic [4:0]   write_reg,
  input  logic [W-1:0] alu_result,
  input  logic [W-1:0] mem_data,
  output logic [W-1:0] read_data1,
  output logic [W-1:0] read_data2,
  output logic [W-1:0] imm_ext,
  output logic [W-1:0] write_data
);

  assign write_data = mem_to_reg ? mem_data : alu_result;

  mips_regfile #(.W(W), .NREGS(32)) u_regfile (
    .clk       (clk),
    .rst       (rst),
    .read_reg1 (instruction[25:21]),
    .read_reg2 (instruction[20:16]),
    .write_reg (write_reg),
    .write_data(write_data),
    .reg_write (reg_write),
    .read_data1(read_data1),
    .read_data2(read_data2)
  );

  generate
    if (W >= 16) begin : g_sext
      assign imm_ext = W'($signed(instruction[15:0]));
    end else begin : g_low
      assign imm_ext = instruction[W-1:0];
    end
  endgenerate

endmodule
