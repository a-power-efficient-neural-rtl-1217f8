// tb_fc_layer: runs the fully connected layer (64 inputs, 10 outputs) on
// random vectors and weights held by testbench memories with a one-clock
// read, and compares every output with a 64-bit integer reference:
//   y = clamp(floor((sum_i x[i]*W[j][i] + b[j]*2^8) / 2^8), -32768, 32767).
// Passes with small values, full-range values (which saturate both ways)
// and back-to-back passes; checks that done comes N_IN + 2 clocks after
// start and that busy covers the pass.
module tb_fc_layer;
  import fc_accel_pkg::*;

  localparam int N_IN = 64, N_OUT = 10, FRAC = 8;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       start = 1'b0, busy, done;
  logic [5:0] rd_row;
  fix16_t     x_in;
  fix16_t     w_in [N_OUT];
  fix16_t     bias [N_OUT];
  fix16_t     y    [N_OUT];
  fix16_t     xm [N_IN];
  fix16_t     wm [N_OUT][N_IN];
  int         checks = 0, failures = 0;
  int         n_sat_hi = 0, n_sat_lo = 0;

  fc_layer dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    x_in <= xm[rd_row];
    for (int j = 0; j < N_OUT; j++) w_in[j] <= wm[j][rd_row];
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fix16_t ref_y(int j);
    longint acc, s;
    acc = 0;
    for (int i = 0; i < N_IN; i++) acc += longint'(xm[i]) * longint'(wm[j][i]);
    acc += longint'(bias[j]) * (longint'(1) << FRAC);
    s = acc >>> FRAC;
    if (s > 32767)  return 16'sh7fff;
    if (s < -32768) return 16'sh8000;
    return fix16_t'(s);
  endfunction

  task automatic fill(input int range);
    for (int i = 0; i < N_IN; i++) xm[i] = fix16_t'($urandom_range(0, 2 * range) - range);
    for (int j = 0; j < N_OUT; j++) begin
      bias[j] = fix16_t'($urandom_range(0, 2 * range) - range);
      for (int i = 0; i < N_IN; i++) wm[j][i] = fix16_t'($urandom_range(0, 2 * range) - range);
    end
  endtask

  task automatic run_pass();
    int lat;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 0;   // clocks since the edge that sampled start
    checks++;
    if (!busy) begin failures++; $display("FAIL busy low after start"); end
    while (!done) begin @(negedge clk); lat++; if (lat > 1000) break; end
    checks++;
    if (lat != N_IN + 2) begin failures++; $display("FAIL latency %0d expected %0d", lat, N_IN + 2); end
    for (int j = 0; j < N_OUT; j++) begin
      fix16_t e;
      e = ref_y(j);
      checks++;
      if (y[j] !== e) begin failures++; $display("FAIL y[%0d]=%0d expected %0d", j, y[j], e); end
      if (e == 16'sh7fff) n_sat_hi++;
      if (e == 16'sh8000) n_sat_lo++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 8; k++) begin fill(300); run_pass(); end
    for (int k = 0; k < 8; k++) begin fill(32767); run_pass(); end
    for (int k = 0; k < 4; k++) begin fill(4000); run_pass(); end
    // a pass that must give exactly 1.0 * 1.0 * 64 + 0.5 = 64.5 (Q8.8)
    for (int i = 0; i < N_IN; i++) xm[i] = 16'sh0100;
    for (int j = 0; j < N_OUT; j++) begin
      bias[j] = 16'sh0080;
      for (int i = 0; i < N_IN; i++) wm[j][i] = (j % 2) ? -16'sh0100 : 16'sh0100;
    end
    run_pass();
    checks++;
    if (y[0] !== 16'sh4080 || y[1] !== -16'sh3f80) begin
      failures++; $display("FAIL known pass y0=%h y1=%h", y[0], y[1]);
    end
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++; $display("FAIL saturation not exercised %0d %0d", n_sat_hi, n_sat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
