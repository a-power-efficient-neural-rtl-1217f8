// uart_system: the complete UART between the GPU and the FPGA logic.
//
// A baud rate generator paces a receiver and a transmitter, each backed by a
// FIFO, wired as in the UART block diagram:
//   rx -> receiver -> (dout, rx_done_tick) -> RX FIFO (w_data, wr)
//   TX FIFO (r_data, empty) -> transmitter (din, tx_start = not empty)
//   transmitter tx_done_tick -> TX FIFO rd;  transmitter -> tx
// The rest of the FPGA reads received words through `r_data`/`rd_uart`/
// `rx_empty` and queues words to send through `w_data`/`wr_uart`/`tx_full`.
// `r_data` shows the oldest received word; asserting `rd_uart` removes it.
//
// Framing (DATA_BITS, PARITY, STOP_HALF_BITS) and the baud rate selection
// follow the description of the link; the system runs at 19200 baud, eight
// data bits, no parity and one stop bit, which are the defaults here. The
// FIFO depth, the 100 MHz clock and the `rx_err` flag are this design's
// choices. `rx_err` pulses for one clock when a word arrives with a parity
// or framing error; the word is still stored. A word arriving while the RX
// FIFO is full is lost.
module uart_system
  import fc_accel_pkg::*;
#(
  parameter int unsigned CLK_HZ         = 100_000_000,
  parameter int unsigned DATA_BITS      = 8,
  parameter parity_e     PARITY         = PAR_NONE,
  parameter int unsigned STOP_HALF_BITS = 2,
  parameter int unsigned FIFO_ADDR_W    = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  baud_sel_e            baud_sel,
  // serial lines
  input  logic                 rx,
  output logic                 tx,
  // receive side
  input  logic                 rd_uart,
  output logic [DATA_BITS-1:0] r_data,
  output logic                 rx_empty,
  output logic                 rx_full,
  output logic                 rx_err,
  // transmit side
  input  logic                 wr_uart,
  input  logic [DATA_BITS-1:0] w_data,
  output logic                 tx_full
);

  logic                 tick;
  logic [DATA_BITS-1:0] rx_dout;
  logic                 rx_done_tick, parity_err, frame_err;
  logic [DATA_BITS-1:0] tx_din;
  logic                 tx_fifo_empty, tx_done_tick;

  baud_gen #(.CLK_HZ(CLK_HZ)) u_baud (
    .clk, .rst_n, .baud_sel, .tick
  );

  uart_rx #(
    .DATA_BITS(DATA_BITS), .PARITY(PARITY), .STOP_HALF_BITS(STOP_HALF_BITS)
  ) u_rx (
    .clk, .rst_n, .rx, .s_tick(tick),
    .dout(rx_dout), .rx_done_tick, .parity_err, .frame_err
  );

  sync_fifo #(.DATA_W(DATA_BITS), .ADDR_W(FIFO_ADDR_W)) u_rx_fifo (
    .clk, .rst_n,
    .wr(rx_done_tick), .w_data(rx_dout),
    .rd(rd_uart), .r_data,
    .full(rx_full), .empty(rx_empty)
  );

  sync_fifo #(.DATA_W(DATA_BITS), .ADDR_W(FIFO_ADDR_W)) u_tx_fifo (
    .clk, .rst_n,
    .wr(wr_uart), .w_data,
    .rd(tx_done_tick), .r_data(tx_din),
    .full(tx_full), .empty(tx_fifo_empty)
  );

  uart_tx #(
    .DATA_BITS(DATA_BITS), .PARITY(PARITY), .STOP_HALF_BITS(STOP_HALF_BITS)
  ) u_tx (
    .clk, .rst_n, .tx_start(!tx_fifo_empty), .s_tick(tick), .din(tx_din),
    .tx_done_tick, .tx
  );

  assign rx_err = rx_done_tick && (parity_err || frame_err);

endmodule
