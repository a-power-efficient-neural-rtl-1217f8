// fc_layer: 16-bit fixed-point fully connected layer, y = W x + b.
//
// Computes the N_OUT outputs of a fully connected layer from an N_IN-long
// feature vector. The weighted inputs are summed sequentially: on each
// clock one input x[i] is read together with the N_OUT weights W[j][i] of
// that input, and N_OUT multiply-accumulate lanes (one per output neuron)
// add x[i]*W[j][i] to their sums. After the last input each lane adds its
// bias, drops the FRAC_BITS fraction bits of the product scale (arithmetic
// shift, i.e. rounding toward minus infinity) and saturates to 16 bits.
//
// Following the description of the system: a fully connected layer on the
// FPGA, 16-bit fixed point, 64 inputs (the 1x1x64 feature vector) and 10
// outputs, weighted inputs summed sequentially. This design's choices: one
// lane per output, the Q(16-FRAC_BITS).FRAC_BITS format with FRAC_BITS = 8,
// a wide accumulator that cannot overflow, truncating rescale and
// saturation. Softmax is not applied here; the raw scores are returned.
//
// Interface: `start` (one clock, while not `busy`) begins a pass. The layer
// drives `rd_row` = 0..N_IN-1 on consecutive clocks and expects `x_in` and
// `w_in` for that row one clock later (synchronous memories). `bias` must be
// stable during the pass. `done` pulses when `y` is updated; `y` then holds
// until the next pass finishes.
// Timing: `done` rises N_IN + 2 clocks after the clock that samples `start`;
// a new pass may start the clock after `done`.
module fc_layer
  import fc_accel_pkg::*;
#(
  parameter int unsigned N_IN      = 64,
  parameter int unsigned N_OUT     = 10,
  parameter int unsigned FRAC_BITS = 8,
  localparam int unsigned ROW_W = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic [ROW_W-1:0] rd_row,
  input  fix16_t           x_in,
  input  fix16_t           w_in [N_OUT],
  input  fix16_t           bias [N_OUT],
  output fix16_t           y    [N_OUT]
);

  localparam int unsigned ACC_W = 2 * FIX_W + ROW_W + 2;
  typedef logic signed [ACC_W-1:0] acc_t;

  localparam acc_t Y_MAX = acc_t'(32767);
  localparam acc_t Y_MIN = -acc_t'(32768);

  logic       issuing;   // rd_row is valid this clock
  logic       mac_en;    // x_in / w_in are valid this clock
  logic       last_iss;  // rd_row is the last row
  logic       last_mac;
  logic       finish;
  acc_t       acc [N_OUT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing  <= 1'b0;
      mac_en   <= 1'b0;
      last_mac <= 1'b0;
      finish   <= 1'b0;
      done     <= 1'b0;
      rd_row   <= '0;
    end else begin
      mac_en   <= issuing;
      last_mac <= issuing && last_iss;
      finish   <= last_mac;
      done     <= finish;
      assert (!(start && busy)) else $error("fc_layer: start while busy");
      if (start && !busy) begin
        issuing <= 1'b1;
        rd_row  <= '0;
      end else if (issuing) begin
        if (last_iss) issuing <= 1'b0;
        else          rd_row  <= rd_row + 1'b1;
      end
    end
  end

  assign last_iss = (rd_row == ROW_W'(N_IN - 1));
  assign busy     = issuing || mac_en || finish;

  for (genvar j = 0; j < N_OUT; j++) begin : g_lane
    acc_t sum;
    acc_t scaled;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                 acc[j] <= '0;
      else if (start && !busy)    acc[j] <= '0;
      else if (mac_en)            acc[j] <= acc[j] + acc_t'(x_in * w_in[j]);
    end

    always_comb begin
      sum    = acc[j] + (acc_t'(bias[j]) <<< FRAC_BITS);
      scaled = sum >>> FRAC_BITS;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) y[j] <= '0;
      else if (finish) begin
        if      (scaled > Y_MAX) y[j] <= fix16_t'(Y_MAX);
        else if (scaled < Y_MIN) y[j] <= fix16_t'(Y_MIN);
        else                     y[j] <= fix16_t'(scaled);
      end
    end
  end

endmodule
