// weight_mem: on-chip store of the fully connected layer's parameters.
//
// Holds the N_OUT x N_IN weight matrix and the N_OUT biases of the fully
// connected layer, all 16-bit fixed point. The pre-trained parameters are
// written once, in the initial stage, one weight at a time; during
// inference the layer reads one column of the matrix per clock: all N_OUT
// weights that multiply input x[rd_row]. The matrix is therefore kept as
// N_OUT separate arrays of N_IN words (one per output neuron), each with one
// write and one read port, which map onto block RAM; the biases are
// registers, always visible on `bias`.
//
// That the weights are loaded in an initial stage and used by a 64-input,
// 10-output fixed-point layer follows the description of the system; the
// organisation, the ports and the one-clock synchronous read are this
// design's choices.
//
// Timing: a write with `w_we` takes effect at the clock edge; `rd_w` shows
// the weights of row `rd_row` one clock after `rd_row` is presented. The
// contents are not reset; the biases reset to zero.
module weight_mem
  import fc_accel_pkg::*;
#(
  parameter int unsigned N_IN  = 64,
  parameter int unsigned N_OUT = 10,
  localparam int unsigned ROW_W = (N_IN  > 1) ? $clog2(N_IN)  : 1,
  localparam int unsigned COL_W = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // weight write port: W[w_col][w_row] <= w_data
  input  logic             w_we,
  input  logic [ROW_W-1:0] w_row,
  input  logic [COL_W-1:0] w_col,
  input  fix16_t           w_data,
  // bias write port: b[b_col] <= w_data
  input  logic             b_we,
  input  logic [COL_W-1:0] b_col,
  // read port
  input  logic [ROW_W-1:0] rd_row,
  output fix16_t           rd_w [N_OUT],
  output fix16_t           bias [N_OUT]
);

  for (genvar j = 0; j < N_OUT; j++) begin : g_lane
    fix16_t mem [N_IN];

    always_ff @(posedge clk) begin
      if (w_we && w_col == COL_W'(j)) mem[w_row] <= w_data;
      rd_w[j] <= mem[rd_row];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                             bias[j] <= '0;
      else if (b_we && b_col == COL_W'(j))    bias[j] <= w_data;
    end
  end

endmodule
