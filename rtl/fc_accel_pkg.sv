// fc_accel_pkg: types and constants shared by the FPGA side of the
// FPGA/GPU fully connected layer accelerator.
//
// The serial link carries frames of one start bit (0), 5..9 data bits sent
// LSB first, an optional parity bit and 1, 1.5 or 2 stop bits (1). Framing
// options and the four selectable baud rates follow the description of the
// link; the 16x oversampling, the 100 MHz board clock and the Q8.8 reading
// of the 16-bit fixed-point numbers are this design's own choices.
package fc_accel_pkg;

  // Parity bit of a frame
  typedef enum logic [1:0] {
    PAR_NONE = 2'd0,
    PAR_EVEN = 2'd1,
    PAR_ODD  = 2'd2
  } parity_e;

  // Selectable baud rates
  typedef enum logic [1:0] {
    BAUD_2400  = 2'd0,
    BAUD_4800  = 2'd1,
    BAUD_9600  = 2'd2,
    BAUD_19200 = 2'd3
  } baud_sel_e;

  // Sampling ticks per bit period
  localparam int unsigned OVERSAMPLE = 16;

  // 16-bit fixed-point word used for inputs, weights, biases and results
  localparam int unsigned FIX_W = 16;
  typedef logic signed [FIX_W-1:0] fix16_t;

  // Baud rate in bits per second for a selection
  function automatic int unsigned baud_of(baud_sel_e sel);
    case (sel)
      BAUD_2400:  return 2400;
      BAUD_4800:  return 4800;
      BAUD_9600:  return 9600;
      default:    return 19200;
    endcase
  endfunction

  // Clock cycles per sampling tick, rounded to the nearest integer, never 0
  function automatic int unsigned tick_div(int unsigned clk_hz, int unsigned baud);
    int unsigned d;
    d = (clk_hz + (baud * OVERSAMPLE) / 2) / (baud * OVERSAMPLE);
    return (d == 0) ? 1 : d;
  endfunction

endpackage
