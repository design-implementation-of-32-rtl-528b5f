// uart_rx: serial receiver for the program-loading link.
//
// Receives 8N1 frames (one start bit, eight data bits least significant first,
// one stop bit) on the idle-high line rx. The line passes through a two-stage
// synchronizer. A falling edge starts a frame; the start bit is checked again
// half a bit later, and each data bit and the stop bit are then sampled in the
// middle of their bit time, CLKS_PER_BIT clock cycles apart. At the stop bit
// data_valid pulses for one cycle with the received byte on data; if the stop
// bit is low the byte is dropped and frame_err pulses instead.
//
// The document only says the machine code reaches the processor through UART.
// The frame format, the mid-bit sampling and the default of 434 clocks per bit
// (115200 baud from a 50 MHz clock) are this design's choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic [7:0] data,
  output logic       data_valid,
  output logic       frame_err
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;

  localparam int unsigned CNT_W = $clog2(CLKS_PER_BIT + 1);

  state_e           state;
  logic [CNT_W-1:0] cnt;
  logic [2:0]       bit_idx;
  logic [7:0]       shreg;
  logic             rx_meta, rx_sync;

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_meta <= 1'b1;
      rx_sync <= 1'b1;
    end else begin
      rx_meta <= rx;
      rx_sync <= rx_meta;
    end
  end

  always_ff @(posedge clk) begin
    data_valid <= 1'b0;
    frame_err  <= 1'b0;
    if (rst) begin
      state   <= S_IDLE;
      cnt     <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      data    <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (!rx_sync) state <= S_START;
        end
        S_START: begin
          if (cnt == CNT_W'(CLKS_PER_BIT / 2)) begin
            cnt <= '0;
            if (!rx_sync) begin
              bit_idx <= '0;
              state   <= S_DATA;
            end else begin
              state <= S_IDLE;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DATA: begin
          if (cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {rx_sync, shreg[7:1]};
            if (bit_idx == 3'd7) state <= S_STOP;
            bit_idx <= bit_idx + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_STOP: begin
          if (cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= S_IDLE;
            if (rx_sync) begin
              data       <= shreg;
              data_valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
