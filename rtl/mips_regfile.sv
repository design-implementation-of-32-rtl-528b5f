// mips_regfile: register file of the MIPS processor.
//
// NREGS registers of W bits with two independent combinational read ports and
// one write port written on the rising clock edge when reg_write is high.
// Register 0 always reads zero and ignores writes. While rst is high every
// register i is loaded with the value i, so programs find known values without
// first loading them (r1 = 1, r2 = 2, ...). A read in the same cycle as a write
// to that register returns the old value; the new one is seen next cycle.
//
// Size (32 x 8 bit), the two-read/one-write organization and the reset to the
// register number follow the document. Reset is synchronous and active high,
// which is this design's choice.
module mips_regfile #(
  parameter int unsigned W     = 8,
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] read_reg1,
  input  logic [$clog2(NREGS)-1:0] read_reg2,
  input  logic [$clog2(NREGS)-1:0] write_reg,
  input  logic [W-1:0]             write_data,
  input  logic                     reg_write,
  output logic [W-1:0]             read_data1,
  output logic [W-1:0]             read_data2
);

  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= W'(i);
    end else if (reg_write && write_reg != '0) begin
      regs[write_reg] <= write_data;
    end
  end

  assign read_data1 = (read_reg1 == '0) ? '0 : regs[read_reg1];
  assign read_data2 = (read_reg2 == '0) ? '0 : regs[read_reg2];

endmodule
