// fc_accel_top: FPGA half of a GPU + FPGA inference system.
//
// A small LeNet-5-like network is split across two devices: the GPU runs the
// floating-point convolution, ReLU and max-pool layers and produces a
// feature vector X[n] (n = 64); this FPGA design runs the last, fully
// connected layer (64 inputs, 10 outputs) in 16-bit fixed point and sends
// the 10 scores back. The two devices talk over a UART serial link.
//
// Data path:
//   rx -> uart_system (receiver, RX FIFO) -> input_ctrl (weight loading,
//   input buffer, control) -> weight_mem / fc_layer -> result_sender
//   (output buffer) -> uart_system (TX FIFO, transmitter) -> tx
//
// Protocol on rx (8 data bits, no parity, 1 stop bit; 19200 baud with
// baud_sel = 3): after reset, or after a `reload` pulse, the first
// 2*(N_IN*N_OUT + N_OUT) bytes are the model: the weights of output 0
// (inputs 0..N_IN-1), of output 1, ..., then the N_OUT biases. Every
// following 2*N_IN bytes are one feature vector. Each 16-bit word is sent
// low byte first and is a signed fixed-point number with FRAC_BITS fraction
// bits. For every vector the design answers on tx with 2*N_OUT bytes: the
// scores y[0..N_OUT-1] = sat16((W x)/2^FRAC_BITS + b), low byte first.
//
// The split of the network, the 64 -> 10 fixed-point layer, the UART with
// its baud rate generator and FIFOs, the input and output buffers and the
// initial loading of the weights follow the description of the system.
// The byte protocol, the number format, the clock frequency, the FIFO depth
// and the reload input are this design's choices.
//
// Status outputs: `weights_loaded` (a full model is stored), `busy` (a pass
// of the layer or the return of its result is under way), `rx_err` (one-
// clock pulse on a received frame with a bad stop bit) and `rx_overflow`
// (one-clock pulse when the RX FIFO is full; a byte arriving then is lost).
module fc_accel_top
  import fc_accel_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 100_000_000,
  parameter int unsigned N_IN        = 64,
  parameter int unsigned N_OUT       = 10,
  parameter int unsigned FRAC_BITS   = 8,
  parameter int unsigned FIFO_ADDR_W = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  baud_sel_e baud_sel,
  input  logic      rx,
  output logic      tx,
  input  logic      reload,
  output logic      weights_loaded,
  output logic      busy,
  output logic      stall,
  output logic      rx_err,
  output logic      rx_overflow
);

  localparam int unsigned ROW_W = (N_IN  > 1) ? $clog2(N_IN)  : 1;
  localparam int unsigned COL_W = (N_OUT > 1) ? $clog2(N_OUT) : 1;

  logic [7:0]       rx_byte, tx_byte;
  logic             rd_uart, rx_empty, rx_full, wr_uart, tx_full;
  logic             w_we, b_we;
  logic [ROW_W-1:0] w_row, rd_row;
  logic [COL_W-1:0] w_col;
  fix16_t           w_data, x_word;
  fix16_t           rd_w [N_OUT];
  fix16_t           bias [N_OUT];
  fix16_t           y    [N_OUT];
  logic             fc_start, fc_busy, fc_done, send_busy;

  uart_system #(
    .CLK_HZ(CLK_HZ), .DATA_BITS(8), .PARITY(PAR_NONE), .STOP_HALF_BITS(2),
    .FIFO_ADDR_W(FIFO_ADDR_W)
  ) u_uart (
    .clk, .rst_n, .baud_sel, .rx, .tx,
    .rd_uart, .r_data(rx_byte), .rx_empty, .rx_full, .rx_err,
    .wr_uart, .w_data(tx_byte), .tx_full
  );

  input_ctrl #(.N_IN(N_IN), .N_OUT(N_OUT)) u_ctrl (
    .clk, .rst_n, .reload,
    .r_data(rx_byte), .rx_empty, .rd_uart,
    .w_we, .b_we, .w_row, .w_col, .w_data,
    .x_rd_row(rd_row), .x_out(x_word),
    .fc_start, .fc_done, .send_busy,
    .weights_loaded, .stall
  );

  weight_mem #(.N_IN(N_IN), .N_OUT(N_OUT)) u_wmem (
    .clk, .rst_n,
    .w_we, .w_row, .w_col, .w_data,
    .b_we, .b_col(w_col),
    .rd_row, .rd_w, .bias
  );

  fc_layer #(.N_IN(N_IN), .N_OUT(N_OUT), .FRAC_BITS(FRAC_BITS)) u_fc (
    .clk, .rst_n, .start(fc_start), .busy(fc_busy), .done(fc_done),
    .rd_row, .x_in(x_word), .w_in(rd_w), .bias, .y
  );

  result_sender #(.N_OUT(N_OUT)) u_send (
    .clk, .rst_n, .load(fc_done), .y, .busy(send_busy),
    .tx_full, .wr_uart, .w_data(tx_byte)
  );

  assign busy        = fc_busy || send_busy || fc_start;
  assign rx_overflow = rx_full;

endmodule
