// mips_dmem: data memory unit.
//
// DEPTH words of W bits, addressed by a byte address (the ALU result). With an
// 8-bit data path each byte address selects one word; with wider words the low
// address bits that select a byte inside the word are dropped (word-aligned
// access only). A store writes write_data on the rising clock edge when
// mem_write is high. A load reads combinationally, in the same cycle, while
// mem_read is high; read_data is 0 otherwise. Address bits above the memory
// size are ignored, so addresses wrap. The array has no reset.
//
// The signals (Address, Write data, Read data, MemWrite, MemRead) follow the
// document, as does the 256 x 8 default size of one memory block. The zero
// output when not reading is this design's choice.
module mips_dmem #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 256
) (
  input  logic         clk,
  input  logic [W-1:0] address,
  input  logic [W-1:0] write_data,
  input  logic         mem_read,
  input  logic         mem_write,
  output logic [W-1:0] read_data
);

  localparam int unsigned BYTE_BITS = (W > 8) ? $clog2(W / 8) : 0;
  localparam int unsigned IDX_W     = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]     mem [DEPTH];
  logic [W-1:0]     word_addr;
  logic [IDX_W-1:0] idx;

  assign word_addr = address >> BYTE_BITS;
  assign idx       = word_addr[IDX_W-1:0];

  always_ff @(posedge clk) begin
    if (mem_write) mem[idx] <= write_data;
  end

  assign read_data = mem_read ? mem[idx] : '0;

endmodule
