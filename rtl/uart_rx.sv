// uart_rx: UART receiver.
//
// Converts the serial line `rx` into parallel words. A finite state machine
// walks through the frame: idle, start bit, DATA_BITS data bits (LSB first),
// an optional parity bit and the stop bit(s). It runs on the sampling enable
// `s_tick` from the baud rate generator, 16 ticks per bit: a falling edge in
// idle starts a frame, the start bit is confirmed at its middle (tick 7), and
// every later bit is sampled 16 ticks after the previous sample, at its
// middle. A start bit that is high again at its middle is taken as a glitch.
//
// The frame format (start 0, 5..9 data bits, optional parity, 1/1.5/2 stop
// bits of 1) and the use of an FSM follow the description of the link.
// The two-flop input synchronizer, the 16x oversampling and the error flags
// are this design's choices.
//
// Interface: `dout` holds the last word; `rx_done_tick` pulses for one clock
// when a frame ends, together with `parity_err` (parity mismatch) and
// `frame_err` (first stop bit sampled low), which are valid with it.
// Timing: rx_done_tick comes 8 + 16*(DATA_BITS + parity) + 8*STOP_HALF_BITS
// sampling ticks (plus two clocks of synchronizer) after the start edge:
// 152 ticks, 9.5 bit times, for 8N1.
module uart_rx
  import fc_accel_pkg::*;
#(
  parameter int unsigned DATA_BITS      = 8,
  parameter parity_e     PARITY         = PAR_NONE,
  parameter int unsigned STOP_HALF_BITS = 2      // 2, 3 or 4: 1, 1.5 or 2 stop bits
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rx,
  input  logic                 s_tick,
  output logic [DATA_BITS-1:0] dout,
  output logic                 rx_done_tick,
  output logic                 parity_err,
  output logic                 frame_err
);

  localparam int unsigned STOP_TICKS = 8 * STOP_HALF_BITS;

  typedef enum logic [2:0] {
    S_IDLE, S_START, S_DATA, S_PARITY, S_STOP
  } state_e;

  state_e                 state;
  logic [5:0]             s_cnt;     // sampling ticks within a bit
  logic [3:0]             n_cnt;     // data bits received
  logic [DATA_BITS-1:0]   shreg;
  logic                   par_bad;
  logic                   rx_m, rx_s; // synchronizer

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_m <= 1'b1;
      rx_s <= 1'b1;
    end else begin
      rx_m <= rx;
      rx_s <= rx_m;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      s_cnt        <= '0;
      n_cnt        <= '0;
      shreg        <= '0;
      dout         <= '0;
      par_bad      <= 1'b0;
      rx_done_tick <= 1'b0;
      parity_err   <= 1'b0;
      frame_err    <= 1'b0;
    end else begin
      rx_done_tick <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (!rx_s) begin
            state <= S_START;
            s_cnt <= '0;
          end
        end
        S_START: begin
          if (s_tick) begin
            if (s_cnt == 6'd7) begin
              s_cnt <= '0;
              n_cnt <= '0;
              state <= rx_s ? S_IDLE : S_DATA;
            end else begin
              s_cnt <= s_cnt + 1'b1;
            end
          end
        end
        S_DATA: begin
          if (s_tick) begin
            if (s_cnt == 6'd15) begin
              s_cnt <= '0;
              shreg <= {rx_s, shreg[DATA_BITS-1:1]};
              if (n_cnt == 4'(DATA_BITS - 1))
                state <= (PARITY == PAR_NONE) ? S_STOP : S_PARITY;
              else
                n_cnt <= n_cnt + 1'b1;
            end else begin
              s_cnt <= s_cnt + 1'b1;
            end
          end
        end
        S_PARITY: begin
          if (s_tick) begin
            if (s_cnt == 6'd15) begin
              s_cnt   <= '0;
              // even parity: data and parity bit hold an even number of ones
              par_bad <= ((^shreg) ^ rx_s) != (PARITY == PAR_ODD);
              state   <= S_STOP;
            end else begin
              s_cnt <= s_cnt + 1'b1;
            end
          end
        end
        S_STOP: begin
          if (s_tick) begin
            if (s_cnt == 6'd15) frame_err <= !rx_s;
            if (s_cnt == 6'(STOP_TICKS - 1)) begin
              s_cnt        <= '0;
              state        <= S_IDLE;
              dout         <= shreg;
              rx_done_tick <= 1'b1;
              parity_err   <= (PARITY != PAR_NONE) && par_bad;
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
