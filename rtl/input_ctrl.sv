// input_ctrl: input buffer and control of the accelerator.
//
// Reads the bytes the GPU sends from the RX FIFO of the UART, joins each
// pair into a 16-bit fixed-point word (low byte first) and routes the words
// according to its mode:
//   LOAD_W  initial stage: N_OUT*N_IN weights, neuron by neuron (all N_IN
//           weights of output 0, then of output 1, ...), into weight_mem;
//   LOAD_B  then the N_OUT biases;
//   RECV_X  each following group of N_IN words is one feature vector X[n],
//           stored in the input buffer;
//   START   once a vector is complete, start the fully connected layer, but
//           stall while the result sender is still returning the previous
//           result (its output buffer would be overwritten);
//   WAIT    wait for the layer to finish, then accept the next vector.
// While a pass runs no bytes are taken; they wait in the RX FIFO.
// A `reload` pulse returns to LOAD_W so a new model can be loaded; it is
// held pending while a pass is running and acted on when it ends, and any
// half-received vector is discarded.
//
// The loading of pre-trained weights in an initial stage, the input buffer
// with its control and the flow GPU -> UART -> fully connected layer follow
// the description of the system. The byte order, the weight order, the
// reload input and the stall on the result sender are this design's
// choices.
//
// Interface: the FIFO side is r_data/rx_empty/rd_uart (rd_uart pops the
// word shown on r_data). The input buffer is read through `x_rd_row` with
// the word on `x_out` one clock later. `weights_loaded` is high once a full
// model has been stored. `stall` is high in every clock the start is held
// back by the result sender.
module input_ctrl
  import fc_accel_pkg::*;
#(
  parameter int unsigned N_IN  = 64,
  parameter int unsigned N_OUT = 10,
  localparam int unsigned ROW_W = (N_IN  > 1) ? $clog2(N_IN)  : 1,
  localparam int unsigned COL_W = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             reload,
  // RX FIFO
  input  logic [7:0]       r_data,
  input  logic             rx_empty,
  output logic             rd_uart,
  // weight memory write port
  output logic             w_we,
  output logic             b_we,
  output logic [ROW_W-1:0] w_row,
  output logic [COL_W-1:0] w_col,
  output fix16_t           w_data,
  // input buffer read port
  input  logic [ROW_W-1:0] x_rd_row,
  output fix16_t           x_out,
  // fully connected layer and result sender
  output logic             fc_start,
  input  logic             fc_done,
  input  logic             send_busy,
  // status
  output logic             weights_loaded,
  output logic             stall
);

  typedef enum logic [2:0] {
    S_LOAD_W, S_LOAD_B, S_RECV_X, S_START, S_WAIT
  } state_e;

  state_e           state;
  logic             have_lo;
  logic [7:0]       lo_byte;
  logic             word_valid;   // a full word is completed this clock
  fix16_t           word;
  logic [ROW_W-1:0] row;
  logic [COL_W-1:0] col;
  logic             reload_pend;
  fix16_t           xbuf [N_IN];
  logic             receiving;

  assign receiving  = (state == S_LOAD_W) || (state == S_LOAD_B) || (state == S_RECV_X);
  assign rd_uart    = receiving && !rx_empty && !reload && !reload_pend;
  assign word_valid = rd_uart && have_lo;
  assign word       = fix16_t'({r_data, lo_byte});

  assign w_data = word;
  assign w_row  = row;
  assign w_col  = col;
  assign w_we   = word_valid && (state == S_LOAD_W);
  assign b_we   = word_valid && (state == S_LOAD_B);
  assign stall  = (state == S_START) && send_busy;

  wire last_row = (row == ROW_W'(N_IN - 1));
  wire last_col = (col == COL_W'(N_OUT - 1));

  // input buffer
  always_ff @(posedge clk) begin
    if (word_valid && state == S_RECV_X) xbuf[row] <= word;
    x_out <= xbuf[x_rd_row];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_LOAD_W;
      have_lo        <= 1'b0;
      lo_byte        <= '0;
      row            <= '0;
      col            <= '0;
      reload_pend    <= 1'b0;
      fc_start       <= 1'b0;
      weights_loaded <= 1'b0;
    end else begin
      fc_start <= 1'b0;
      if (reload) reload_pend <= 1'b1;

      if ((reload || reload_pend) && state != S_WAIT && state != S_START) begin
        state          <= S_LOAD_W;
        have_lo        <= 1'b0;
        row            <= '0;
        col            <= '0;
        reload_pend    <= 1'b0;
        weights_loaded <= 1'b0;
      end else begin
        if (rd_uart) begin
          have_lo <= !have_lo;
          if (!have_lo) lo_byte <= r_data;
        end
        unique case (state)
          S_LOAD_W: if (word_valid) begin
            if (last_row) begin
              row <= '0;
              if (last_col) begin
                col   <= '0;
                state <= S_LOAD_B;
              end else begin
                col <= col + 1'b1;
              end
            end else begin
              row <= row + 1'b1;
            end
          end
          S_LOAD_B: if (word_valid) begin
            if (last_col) begin
              col            <= '0;
              state          <= S_RECV_X;
              weights_loaded <= 1'b1;
            end else begin
              col <= col + 1'b1;
            end
          end
          S_RECV_X: if (word_valid) begin
            if (last_row) begin
              row   <= '0;
              state <= S_START;
            end else begin
              row <= row + 1'b1;
            end
          end
          S_START: if (!send_busy) begin
            fc_start <= 1'b1;
            state    <= S_WAIT;
          end
          S_WAIT: if (fc_done) begin
            state <= S_RECV_X;
          end
          default: state <= S_LOAD_W;
        endcase
      end
    end
  end

endmodule
