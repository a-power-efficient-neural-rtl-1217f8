// tb_fc_accel_top: end-to-end test of the accelerator through its serial
// pins only, at 64 inputs and 10 outputs, with the clock scaled down
// (CLK_HZ = 16 * 19200 * 4, four clocks per sampling tick) so that the
// serial traffic simulates quickly. The testbench plays the GPU: it sends
// bytes on `rx` at the selected baud rate and decodes the bytes on `tx`.
//
// Sequence: load model A; three feature vectors sent back to back (results
// flow back while the next vector arrives); one vector at 9600 baud; a
// frame with a low stop bit (rx_err) that leaves half a word behind; a
// reload; model B; a vector that saturates outputs in both directions and
// one ordinary vector. Every result is compared with a reference computed
// here: y[j] = clamp(floor((sum_i x[i]*W[j][i]) / 256) + b[j]).
// Every mechanism must happen at least once: initial model load, reload,
// inference, return of results, TX FIFO full back-pressure, baud switch,
// receive error, saturation.
module tb_fc_accel_top;
  import fc_accel_pkg::*;

  localparam int unsigned CLK_HZ = 16 * 19200 * 4;
  localparam int N_IN = 64, N_OUT = 10;

  logic      clk = 1'b0, rst_n = 1'b0;
  baud_sel_e baud_sel = BAUD_19200;
  logic      rx = 1'b1, tx, reload = 1'b0;
  logic      weights_loaded, busy, stall, rx_err, rx_overflow;

  fc_accel_top #(.CLK_HZ(CLK_HZ)) dut (.*);

  always #5 clk = ~clk;

  int         checks = 0, failures = 0;
  int         bit_clks = CLK_HZ / 19200;
  fix16_t     W [N_OUT][N_IN];
  fix16_t     B [N_OUT];
  fix16_t     expq [$];            // expected results, in order
  logic [7:0] rxq [$];             // decoded bytes from tx
  // mechanism counters
  int n_load = 0, n_reload = 0, n_vec = 0, n_res = 0, n_txfull = 0;
  int n_baud = 0, n_rxerr = 0, n_sat = 0;

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (rx_err) n_rxerr++;
    if (dut.u_send.busy && dut.tx_full) n_txfull++;
  end

  // ---- GPU side serial port model ----
  task automatic send_byte(input logic [7:0] d);
    rx = 1'b0; repeat (bit_clks) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = d[i]; repeat (bit_clks) @(posedge clk); end
    rx = 1'b1; repeat (bit_clks) @(posedge clk);
  endtask

  task automatic send_word(input fix16_t v);
    send_byte(v[7:0]);
    send_byte(v[15:8]);
  endtask

  initial begin : decoder
    logic [7:0] d;
    forever begin
      @(negedge tx);
      repeat (bit_clks / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (bit_clks) @(posedge clk); d[i] = tx; end
      repeat (bit_clks) @(posedge clk);
      checks++;
      if (tx !== 1'b1) begin failures++; $display("FAIL stop bit on tx"); end
      rxq.push_back(d);
    end
  end

  // results checker: pairs of bytes against the expected queue
  initial begin : result_check
    fix16_t got;
    forever begin
      wait (rxq.size() >= 2);
      got = fix16_t'({rxq[1], rxq[0]});
      void'(rxq.pop_front()); void'(rxq.pop_front());
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected result %h", got);
      end else begin
        if (got !== expq[0]) begin
          failures++; $display("FAIL result %0d: %h expected %h", n_res, got, expq[0]);
        end
        void'(expq.pop_front());
      end
      n_res++;
    end
  end

  // ---- reference ----
  task automatic expect_vector(input fix16_t x [N_IN]);
    for (int j = 0; j < N_OUT; j++) begin
      longint acc, s;
      acc = 0;
      for (int i = 0; i < N_IN; i++) acc += longint'(x[i]) * longint'(W[j][i]);
      s = (acc + longint'(B[j]) * 256) >>> 8;
      if (s > 32767)  begin s = 32767;  n_sat++; end
      if (s < -32768) begin s = -32768; n_sat++; end
      expq.push_back(fix16_t'(s));
    end
  endtask

  task automatic load_model(input int wrange);
    for (int j = 0; j < N_OUT; j++)
      for (int i = 0; i < N_IN; i++) W[j][i] = fix16_t'($urandom_range(0, 2 * wrange) - wrange);
    for (int j = 0; j < N_OUT; j++) B[j] = fix16_t'($urandom_range(0, 2048) - 1024);
    checks++;
    if (weights_loaded) begin failures++; $display("FAIL weights_loaded before the model"); end
    for (int j = 0; j < N_OUT; j++)
      for (int i = 0; i < N_IN; i++) send_word(W[j][i]);
    for (int j = 0; j < N_OUT; j++) send_word(B[j]);
    repeat (4 * bit_clks) @(posedge clk);
    checks++;
    if (!weights_loaded) begin failures++; $display("FAIL weights_loaded low after the model"); end
    n_load++;
  endtask

  task automatic vector(input int xrange);
    fix16_t x [N_IN];
    for (int i = 0; i < N_IN; i++) x[i] = fix16_t'($urandom_range(0, 2 * xrange) - xrange);
    expect_vector(x);
    for (int i = 0; i < N_IN; i++) send_word(x[i]);
    n_vec++;
  endtask

  task automatic drain();
    int t;
    t = 0;
    while ((expq.size() > 0 || busy) && t < 40 * 10 * bit_clks) begin @(posedge clk); t++; end
    repeat (2 * bit_clks) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d results missing", expq.size()); end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);

    load_model(128);
    vector(256); vector(256); vector(256);
    drain();

    baud_sel = BAUD_9600; bit_clks = CLK_HZ / 9600; n_baud++;
    repeat (50) @(posedge clk);
    vector(256);
    drain();
    baud_sel = BAUD_19200; bit_clks = CLK_HZ / 19200; n_baud++;
    repeat (50) @(posedge clk);

    // a frame whose stop bit is low: flagged, and its byte is half a word
    rx = 1'b0; repeat (bit_clks) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = 1'(i % 2); repeat (bit_clks) @(posedge clk); end
    rx = 1'b0; repeat (bit_clks) @(posedge clk);
    rx = 1'b1; repeat (12 * bit_clks) @(posedge clk);
    checks++;
    if (n_rxerr == 0) begin failures++; $display("FAIL rx_err not raised"); end

    // reload drops the stray byte and waits for a new model
    @(negedge clk); reload = 1'b1; @(negedge clk); reload = 1'b0; n_reload++;
    repeat (5) @(posedge clk);
    load_model(8000);
    vector(20000);
    vector(256);
    drain();

    checks++;
    if (rx_overflow) begin failures++; $display("FAIL RX FIFO overflow"); end
    // every mechanism must have happened
    begin
      int m [8];
      string nm [8];
      m = '{n_load, n_reload, n_vec, n_res, n_txfull, n_baud, n_rxerr, n_sat};
      nm = '{"model load", "reload", "vector", "result", "tx fifo full", "baud switch", "rx error", "saturation"};
      for (int k = 0; k < 8; k++) begin
        $display("mechanism %-13s happened %0d times", nm[k], m[k]);
        checks++;
        if (m[k] == 0) begin failures++; $display("FAIL %s never happened", nm[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
