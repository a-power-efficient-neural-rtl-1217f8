// baud_gen: baud rate generator of the UART.
//
// Produces `tick`, a one-clock pulse at 16 times the selected baud rate,
// which the receiver and transmitter use as their sampling enable (s_tick).
// A free-running counter counts clock cycles and wraps after the divisor of
// the rate chosen on `baud_sel`: 2400, 4800, 9600 or 19200 baud. These four
// rates and the generator's place in the UART follow the description of the
// link; the counter, the rounding of the divisor to the nearest integer and
// the 100 MHz default clock are this design's choices. The 19200 baud rate
// is the one the system runs at.
//
// Timing: after reset, the first tick comes DIV clocks later, then every DIV
// clocks, where DIV = round(CLK_HZ / (16 * baud)). A change of `baud_sel`
// restarts the count.
module baud_gen
  import fc_accel_pkg::*;
#(
  parameter int unsigned CLK_HZ = 100_000_000
) (
  input  logic      clk,
  input  logic      rst_n,
  input  baud_sel_e baud_sel,
  output logic      tick
);

  localparam int unsigned DIV_MAX = tick_div(CLK_HZ, 2400);
  localparam int unsigned CNT_W   = (DIV_MAX > 1) ? $clog2(DIV_MAX) : 1;

  typedef logic [CNT_W-1:0] cnt_t;

  localparam cnt_t DIV_2400  = cnt_t'(tick_div(CLK_HZ, 2400)  - 1);
  localparam cnt_t DIV_4800  = cnt_t'(tick_div(CLK_HZ, 4800)  - 1);
  localparam cnt_t DIV_9600  = cnt_t'(tick_div(CLK_HZ, 9600)  - 1);
  localparam cnt_t DIV_19200 = cnt_t'(tick_div(CLK_HZ, 19200) - 1);

  cnt_t      cnt;
  cnt_t      last;
  baud_sel_e sel_q;

  always_comb begin
    case (baud_sel)
      BAUD_2400: last = DIV_2400;
      BAUD_4800: last = DIV_4800;
      BAUD_9600: last = DIV_9600;
      default:   last = DIV_19200;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      tick  <= 1'b0;
      sel_q <= BAUD_19200;
    end else begin
      sel_q <= baud_sel;
      if (sel_q != baud_sel) begin
        cnt  <= '0;
        tick <= 1'b0;
      end else if (cnt == last) begin
        cnt  <= '0;
        tick <= 1'b1;
      end else begin
        cnt  <= cnt + 1'b1;
        tick <= 1'b0;
      end
    end
  end

endmodule
