// uart_tx: UART transmitter.
//
// Serialises one word onto the line `tx`: a start bit (0), DATA_BITS data
// bits LSB first, an optional parity bit and STOP_HALF_BITS/2 stop bits (1).
// Like the receiver it is a finite state machine paced by `s_tick`, 16 ticks
// per bit. The line idles high.
//
// The frame format and the FSM follow the description of the link; the
// registered output, the 16x pacing and the handshake are this design's
// choices.
//
// Interface: while idle, `tx_start` high makes it take `din` and begin a
// frame. `tx_done_tick` is high for one clock, the last clock of the last
// stop bit, combinationally, and a pending `tx_start` one clock later
// starts the next frame with no gap. In the UART system `tx_start` is the
// TX FIFO's "not empty" and `tx_done_tick` pops the FIFO.
// Timing: a frame lasts 16*(1 + DATA_BITS + parity) + 8*STOP_HALF_BITS
// sampling ticks.
module uart_tx
  import fc_accel_pkg::*;
#(
  parameter int unsigned DATA_BITS      = 8,
  parameter parity_e     PARITY         = PAR_NONE,
  parameter int unsigned STOP_HALF_BITS = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tx_start,
  input  logic                 s_tick,
  input  logic [DATA_BITS-1:0] din,
  output logic                 tx_done_tick,
  output logic                 tx
);

  localparam int unsigned STOP_TICKS = 8 * STOP_HALF_BITS;

  typedef enum logic [2:0] {
    S_IDLE, S_START, S_DATA, S_PARITY, S_STOP
  } state_e;

  state_e               state;
  logic [5:0]           s_cnt;
  logic [3:0]           n_cnt;
  logic [DATA_BITS-1:0] shreg;
  logic                 par_bit;

  // Combinational, so that the FIFO pops the sent word at the same edge at
  // which the FSM returns to idle and cannot start the same word twice.
  assign tx_done_tick = (state == S_STOP) && s_tick && (s_cnt == 6'(STOP_TICKS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      s_cnt        <= '0;
      n_cnt        <= '0;
      shreg        <= '0;
      par_bit      <= 1'b0;
      tx           <= 1'b1;
    end else begin
      unique case (state)
        S_IDLE: begin
          tx <= 1'b1;
          if (tx_start) begin
            state   <= S_START;
            s_cnt   <= '0;
            shreg   <= din;
            par_bit <= (^din) ^ (PARITY == PAR_ODD);
            tx      <= 1'b0;
          end
        end
        S_START: begin
          tx <= 1'b0;
          if (s_tick) begin
            if (s_cnt == 6'd15) begin
              s_cnt <= '0;
              n_cnt <= '0;
              state <= S_DATA;
              tx    <= shreg[0];
            end else begin
              s_cnt <= s_cnt + 1'b1;
            end
          end
        end
        S_DATA: begin
          if (s_tick) begin
            if (s_cnt == 6'd15) begin
              s_cnt <= '0;
              shreg <= shreg >> 1;
              if (n_cnt == 4'(DATA_BITS - 1)) begin
                state <= (PARITY == PAR_NONE) ? S_STOP : S_PARITY;
                tx    <= (PARITY == PAR_NONE) ? 1'b1 : par_bit;
              end else begin
                n_cnt <= n_cnt + 1'b1;
                tx    <= shreg[1];
              end
            end else begin
              s_cnt <= s_cnt + 1'b1;
            end
          end
        end
        S_PARITY: begin
          if (s_tick) begin
            if (s_cnt == 6'd15) begin
              s_cnt <= '0;
              state <= S_STOP;
              tx    <= 1'b1;
            end else begin
              s_cnt <= s_cnt + 1'b1;
            end
          end
        end
        S_STOP: begin
          tx <= 1'b1;
          if (s_tick) begin
            if (s_cnt == 6'(STOP_TICKS - 1)) begin
              s_cnt        <= '0;
              state        <= S_IDLE;
            end else begin
              s_cnt <= s_cnt + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
