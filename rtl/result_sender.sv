// result_sender: output buffer and "send results back" stage.
//
// When the fully connected layer finishes (`load`), copies its N_OUT 16-bit
// results into an output buffer and then writes them, low byte first and
// output 0 first, into the TX FIFO of the UART, one byte per clock whenever
// the FIFO is not full. The UART then returns them to the GPU.
//
// The output buffer and the return of the results over the UART follow the
// description of the system; the byte order and the handshake are this
// design's choices.
//
// Interface: `load` (one clock) captures `y`; `busy` is high from the clock
// after `load` until the last byte has been written. `wr_uart`/`w_data` go
// to the TX FIFO, `tx_full` holds them back. A `load` while busy is ignored.
// Timing: with room in the FIFO, the 2*N_OUT bytes are written on
// consecutive clocks starting the clock after `load`.
module result_sender
  import fc_accel_pkg::*;
#(
  parameter int unsigned N_OUT = 10,
  localparam int unsigned IDX_W = $clog2(2 * N_OUT)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  fix16_t     y [N_OUT],
  output logic       busy,
  input  logic       tx_full,
  output logic       wr_uart,
  output logic [7:0] w_data
);

  fix16_t           obuf [N_OUT];
  logic [IDX_W-1:0] idx;        // byte index, 2*output + (1 for high byte)
  fix16_t           cur;

  assign cur     = obuf[idx[IDX_W-1:1]];
  assign w_data  = idx[0] ? cur[15:8] : cur[7:0];
  assign wr_uart = busy && !tx_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      idx  <= '0;
      for (int j = 0; j < N_OUT; j++) obuf[j] <= '0;
    end else if (!busy) begin
      if (load) begin
        obuf <= y;
        idx  <= '0;
        busy <= 1'b1;
      end
    end else if (wr_uart) begin
      if (idx == IDX_W'(2 * N_OUT - 1)) busy <= 1'b0;
      idx <= idx + 1'b1;
    end
  end

endmodule
