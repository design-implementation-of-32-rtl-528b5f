// mips_uart_loader: run-time loader of machine code into instruction memory.
//
// While prog_mode is high, every byte received from the UART is shifted into a
// 32-bit word, most significant byte first (MIPS big-endian order). After the
// fourth byte the word is written to the instruction memory at the next word
// address, starting from 0, and words_loaded counts up. The byte and word
// counters return to 0 whenever prog_mode is low, so each loading session
// starts at address 0; bytes that arrive while prog_mode is low are ignored.
// words_loaded holds the number of words of the latest session; it is cleared
// when prog_mode rises.
// The processor is meant to be held in reset while prog_mode is high (see the
// top level), so the new program runs from address 0 as soon as loading ends.
// imem_we is a one-cycle pulse, one clock after the fourth byte's data_valid.
//
// The document states that machine code is sent from a software tool over UART
// into the soft-core's instruction memory; the byte order, the prog_mode pin
// and the load-from-zero rule are this design's choices.
module mips_uart_loader #(
  parameter int unsigned IMEM_DEPTH = 64
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          prog_mode,
  input  logic [7:0]                    rx_data,
  input  logic                          rx_valid,
  output logic                          imem_we,
  output logic [$clog2(IMEM_DEPTH)-1:0] imem_waddr,
  output logic [31:0]                   imem_wdata,
  output logic [$clog2(IMEM_DEPTH):0]   words_loaded
);

  logic [1:0]  byte_cnt;
  logic [23:0] upper;
  logic        prog_q;

  always_ff @(posedge clk) begin
    imem_we <= 1'b0;
    prog_q  <= prog_mode & ~rst;
    if (rst || !prog_mode) begin
      byte_cnt <= '0;
      upper    <= '0;
      if (rst) begin
        imem_waddr   <= '0;
        imem_wdata   <= '0;
        words_loaded <= '0;
      end else begin
        imem_waddr <= '0;
      end
    end else begin
      if (imem_we) imem_waddr <= imem_waddr + 1'b1;
      if (rx_valid) begin
        byte_cnt <= byte_cnt + 1'b1;
        if (byte_cnt == 2'd3) begin
          imem_wdata <= {upper, rx_data};
          imem_we    <= 1'b1;
        end else begin
          upper <= {upper[15:0], rx_data};
        end
      end
      if (!prog_q)      words_loaded <= '0;
      else if (imem_we) words_loaded <= words_loaded + 1'b1;
    end
  end

endmodule
