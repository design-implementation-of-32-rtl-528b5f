// mips_imem: instruction memory.
//
// DEPTH words of 32 bits. The read port is indexed by the byte address pc with
// its two low bits dropped, and answers combinationally, so the instruction is
// available in the same cycle as the PC. Address bits above the memory size are
// ignored. The write port (write_en, write_addr as a word index, write_data)
// stores one word on the rising clock edge; it is used to load the program at
// run time over the serial link. The array has no reset.
//
// Word-addressed reads by a byte-address PC follow the document. Its depth is
// not stated; 64 words is what an 8-bit byte-address PC can reach, and is this
// design's default. The write port is this design's way of receiving the
// program the document sends over UART.
module mips_imem #(
  parameter int unsigned PC_W  = 8,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic [PC_W-1:0]          pc,
  output logic [31:0]              instruction,
  input  logic                     write_en,
  input  logic [$clog2(DEPTH)-1:0] write_addr,
  input  logic [31:0]              write_data
);

  localparam int unsigned IDX_W = $clog2(DEPTH);

  logic [31:0]      mem [DEPTH];
  logic [PC_W-1:0]  word_addr;
  logic [IDX_W-1:0] idx;

  assign word_addr   = pc >> 2;
  assign idx         = word_addr[IDX_W-1:0];
  assign instruction = mem[idx];

  always_ff @(posedge clk) begin
    if (write_en) mem[write_addr] <= write_data;
  end

endmodule
