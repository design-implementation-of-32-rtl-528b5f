// mips_top: MIPS soft-core system with run-time program loading over UART.
//
// A single-cycle MIPS processor (mips_core) runs from an instruction memory and
// a data memory. The program is not fixed at build time: a host sends the
// machine code over a serial line, a UART receiver turns it into bytes, and the
// loader packs them into 32-bit words written into the instruction memory from
// address 0 upwards. While prog_mode is high the processor is held in reset;
// when prog_mode falls the processor leaves reset with its registers set to
// their own numbers and starts executing at address 0.
//
// Ports: clk and rst (synchronous, active high), prog_mode and uart_rx for
// loading; words_loaded counts the words of the last load. For observing a
// running program the PC, the current instruction, the data-memory bus
// (address, write data, write strobe) and the ALU overflow flag are brought out.
//
// PIPELINED selects the processor: 0 (default) the single-cycle mips_core, 1
// the five-stage mips_pipeline_core, which needs scheduled code (see there).
//
// The defaults (8-bit data path, 8-bit PC, 32 registers, 256-byte data memory,
// single-cycle processor) follow the document. The 64-word instruction memory, the loading protocol and
// the UART rate are this design's choices.
module mips_top #(
  parameter int unsigned DATA_W       = 8,
  parameter int unsigned PC_W         = 8,
  parameter int unsigned IMEM_DEPTH   = 64,
  parameter int unsigned DMEM_DEPTH   = 256,
  parameter int unsigned CLKS_PER_BIT = 434,
  parameter bit          PIPELINED    = 1'b0
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          prog_mode,
  input  logic                          uart_rx,
  output logic [$clog2(IMEM_DEPTH):0]   words_loaded,
  output logic [PC_W-1:0]               pc,
  output logic [31:0]                   instruction,
  output logic [DATA_W-1:0]             data_addr,
  output logic [DATA_W-1:0]             data_wdata,
  output logic                          data_we,
  output logic                          overflow
);

  logic [7:0]                    rx_byte;
  logic                          rx_valid, rx_frame_err;
  logic                          imem_we;
  logic [$clog2(IMEM_DEPTH)-1:0] imem_waddr;
  logic [31:0]                   imem_wdata;
  logic                          core_rst, memrd;
  logic [DATA_W-1:0]             dmem_rdata;

  assign core_rst = rst | prog_mode;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_rx (
    .clk       (clk),
    .rst       (rst),
    .rx        (uart_rx),
    .data      (rx_byte),
    .data_valid(rx_valid),
    .frame_err (rx_frame_err)
  );

  mips_uart_loader #(.IMEM_DEPTH(IMEM_DEPTH)) u_loader (
    .clk         (clk),
    .rst         (rst),
    .prog_mode   (prog_mode),
    .rx_data     (rx_byte),
    .rx_valid    (rx_valid),
    .imem_we     (imem_we),
    .imem_waddr  (imem_waddr),
    .imem_wdata  (imem_wdata),
    .words_loaded(words_loaded)
  );

  mips_imem #(.PC_W(PC_W), .DEPTH(IMEM_DEPTH)) u_imem (
    .clk        (clk),
    .pc         (pc),
    .instruction(instruction),
    .write_en   (imem_we),
    .write_addr (imem_waddr),
    .write_data (imem_wdata)
  );

  generate
    if (PIPELINED) begin : g_pipelined
      mips_pipeline_core #(.W(DATA_W), .PC_W(PC_W)) u_core (
        .clk_h   (clk),
        .rst_h   (core_rst),
        .instadd (pc),
        .ir      (instruction),
        .dataadd (data_addr),
        .data_out(data_wdata),
        .data_in (dmem_rdata),
        .memwr   (data_we),
        .memrd   (memrd),
        .overflow(overflow)
      );
    end else begin : g_single_cycle
      mips_core #(.W(DATA_W), .PC_W(PC_W)) u_core (
        .clk_h   (clk),
        .rst_h   (core_rst),
        .instadd (pc),
        .ir      (instruction),
        .dataadd (data_addr),
        .data_out(data_wdata),
        .data_in (dmem_rdata),
        .memwr   (data_we),
        .memrd   (memrd),
        .overflow(overflow)
      );
    end
  endgenerate

  mips_dmem #(.W(DATA_W), .DEPTH(DMEM_DEPTH)) u_dmem (
    .clk       (clk),
    .address   (data_addr),
    .write_data(data_wdata),
    .mem_read  (memrd),
    .mem_write (data_we),
    .read_data (dmem_rdata)
  );

endmodule
