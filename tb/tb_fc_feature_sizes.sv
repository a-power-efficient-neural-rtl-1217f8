// tb_fc_feature_sizes: the feature-size comparison workload. Three copies
// of the accelerator, built for n = 16, 32 and 64 inputs (10 outputs each),
// are loaded with random models over their serial lines and given three
// random feature vectors each, all in parallel. Every result is checked
// against a reference. For each size the testbench reports the clocks the
// fully connected layer needs per vector (n + 2 expected and checked) and
// the serial time per inference, 10 bits per byte:
//   (2n + 20) bytes * 10 bits / 19200 baud.
// The clock is scaled down (four clocks per sampling tick) to keep the
// simulation short; clock counts of the layer do not depend on it.
module tb_fc_feature_sizes;
  import fc_accel_pkg::*;

  localparam int unsigned CLK_HZ = 16 * 19200 * 4;
  localparam int BIT_CLKS = CLK_HZ / 19200;
  localparam int N_OUT = 10;
  localparam int NS [3] = '{16, 32, 64};

  logic      clk = 1'b0, rst_n = 1'b0;
  int        checks = 0, failures = 0;
  int        done_cnt = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 3; g++) begin : g_size
    localparam int N = NS[g];
    logic      rx = 1'b1, tx;
    logic      weights_loaded, busy, stall, rx_err, rx_overflow;
    fix16_t    W [N_OUT][N];
    fix16_t    B [N_OUT];
    fix16_t    expq [$];
    logic [7:0] rxq [$];
    int        n_res = 0, pass_clks = -1, t_start = 0, now = 0;

    fc_accel_top #(.CLK_HZ(CLK_HZ), .N_IN(N)) dut (
      .clk, .rst_n, .baud_sel(BAUD_19200), .rx, .tx, .reload(1'b0),
      .weights_loaded, .busy, .stall, .rx_err, .rx_overflow
    );

    // clocks of one layer pass, from start to done
    always @(posedge clk) if (rst_n) begin
      now++;
      if (dut.fc_start) t_start = now;
      if (dut.fc_done) begin
        // start is sampled at t_start; done is high after edge t_start + N + 2
        // and seen here one edge later
        pass_clks = now - t_start - 1;
        checks++;
        if (pass_clks != N + 2) begin
          failures++; $display("FAIL n=%0d pass took %0d clocks", N, pass_clks);
        end
      end
    end

    task automatic send_byte(input logic [7:0] d);
      rx = 1'b0; repeat (BIT_CLKS) @(posedge clk);
      for (int i = 0; i < 8; i++) begin rx = d[i]; repeat (BIT_CLKS) @(posedge clk); end
      rx = 1'b1; repeat (BIT_CLKS) @(posedge clk);
    endtask

    task automatic send_word(input fix16_t v);
      send_byte(v[7:0]);
      send_byte(v[15:8]);
    endtask

    initial begin : decoder
      logic [7:0] d;
      forever begin
        @(negedge tx);
        repeat (BIT_CLKS / 2) @(posedge clk);
        for (int i = 0; i < 8; i++) begin repeat (BIT_CLKS) @(posedge clk); d[i] = tx; end
        repeat (BIT_CLKS) @(posedge clk);
        rxq.push_back(d);
      end
    end

    initial begin : result_check
      fix16_t got;
      forever begin
        wait (rxq.size() >= 2);
        got = fix16_t'({rxq[1], rxq[0]});
        void'(rxq.pop_front()); void'(rxq.pop_front());
        checks++;
        if (expq.size() == 0 || got !== expq[0]) begin
          failures++; $display("FAIL n=%0d result %0d: %h", N, n_res, got);
        end
        if (expq.size() > 0) void'(expq.pop_front());
        n_res++;
      end
    end

    initial begin : stimulus
      fix16_t x [N];
      wait (rst_n);
      repeat (10) @(posedge clk);
      for (int j = 0; j < N_OUT; j++)
        for (int i = 0; i < N; i++) W[j][i] = fix16_t'($urandom_range(0, 256) - 128);
      for (int j = 0; j < N_OUT; j++) B[j] = fix16_t'($urandom_range(0, 2048) - 1024);
      for (int j = 0; j < N_OUT; j++)
        for (int i = 0; i < N; i++) send_word(W[j][i]);
      for (int j = 0; j < N_OUT; j++) send_word(B[j]);
      for (int v = 0; v < 3; v++) begin
        for (int i = 0; i < N; i++) x[i] = fix16_t'($urandom_range(0, 512) - 256);
        for (int j = 0; j < N_OUT; j++) begin
          longint acc, s;
          acc = 0;
          for (int i = 0; i < N; i++) acc += longint'(x[i]) * longint'(W[j][i]);
          s = (acc + longint'(B[j]) * 256) >>> 8;
          if (s > 32767)  s = 32767;
          if (s < -32768) s = -32768;
          expq.push_back(fix16_t'(s));
        end
        for (int i = 0; i < N; i++) send_word(x[i]);
      end
      while (expq.size() > 0 || busy) @(posedge clk);
      repeat (2 * BIT_CLKS) @(posedge clk);
      checks++;
      if (n_res != 3 * N_OUT) begin failures++; $display("FAIL n=%0d: %0d results", N, n_res); end
      $display("n=%0d: layer pass %0d clocks; serial time per inference %0d us at 19200 baud",
               N, pass_clks, ((2 * N + 2 * N_OUT) * 10 * 1_000_000) / 19200);
      done_cnt++;
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    wait (done_cnt == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
