// tb_fc_accel_full: the accelerator at its default parameters (100 MHz
// clock, 19200 baud, 64 inputs, 10 outputs, Q8.8) through one complete
// operation: the whole model is loaded over the serial line, two feature
// vectors are sent and both sets of 10 results are decoded from `tx` and
// compared with a reference computed here. It also measures the bit time
// (16 sampling ticks): at 19200 baud a bit lasts about 52 us, i.e. 5208
// clocks; the generator's rounded divisor gives 16 * 326 = 5216 clocks,
// within 0.2 %. The run takes about 80 million clocks.
module tb_fc_accel_full;
  import fc_accel_pkg::*;

  localparam int N_IN = 64, N_OUT = 10;
  localparam int BIT_CLKS = 100_000_000 / 19200;     // 5208

  logic      clk = 1'b0, rst_n = 1'b0;
  baud_sel_e baud_sel = BAUD_19200;
  logic      rx = 1'b1, tx, reload = 1'b0;
  logic      weights_loaded, busy, stall, rx_err, rx_overflow;

  fc_accel_top dut (.*);

  always #5 clk = ~clk;    // 100 MHz

  int         checks = 0, failures = 0;
  fix16_t     W [N_OUT][N_IN];
  fix16_t     B [N_OUT];
  fix16_t     expq [$];
  logic [7:0] rxq [$];
  int         n_res = 0;
  int         start_bit_clks = 0;

  initial begin
    repeat (100_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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
      checks++;
      if (tx !== 1'b1) begin failures++; $display("FAIL stop bit on tx"); end
      rxq.push_back(d);
    end
  end

  // bit time: 16 sampling ticks of the baud rate generator
  initial begin : bit_time
    int t;
    @(posedge rst_n);
    @(posedge clk iff dut.u_uart.tick);
    t = 0;
    do begin @(posedge clk); t++; end while (!dut.u_uart.tick);
    start_bit_clks = 16 * t;
  end

  initial begin : result_check
    fix16_t got;
    forever begin
      wait (rxq.size() >= 2);
      got = fix16_t'({rxq[1], rxq[0]});
      void'(rxq.pop_front()); void'(rxq.pop_front());
      checks++;
      if (expq.size() == 0 || got !== expq[0]) begin
        failures++; $display("FAIL result %0d: %h", n_res, got);
      end
      if (expq.size() > 0) void'(expq.pop_front());
      n_res++;
    end
  end

  task automatic vector();
    fix16_t x [N_IN];
    for (int i = 0; i < N_IN; i++) x[i] = fix16_t'($urandom_range(0, 512) - 256);
    for (int j = 0; j < N_OUT; j++) begin
      longint acc, s;
      acc = 0;
      for (int i = 0; i < N_IN; i++) acc += longint'(x[i]) * longint'(W[j][i]);
      s = (acc + longint'(B[j]) * 256) >>> 8;
      if (s > 32767)  s = 32767;
      if (s < -32768) s = -32768;
      expq.push_back(fix16_t'(s));
    end
    for (int i = 0; i < N_IN; i++) send_word(x[i]);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);
    for (int j = 0; j < N_OUT; j++)
      for (int i = 0; i < N_IN; i++) W[j][i] = fix16_t'($urandom_range(0, 256) - 128);
    for (int j = 0; j < N_OUT; j++) B[j] = fix16_t'($urandom_range(0, 2048) - 1024);
    for (int j = 0; j < N_OUT; j++)
      for (int i = 0; i < N_IN; i++) send_word(W[j][i]);
    for (int j = 0; j < N_OUT; j++) send_word(B[j]);
    repeat (2 * BIT_CLKS) @(posedge clk);
    checks++;
    if (!weights_loaded) begin failures++; $display("FAIL model not loaded"); end
    vector();
    vector();
    while (expq.size() > 0 || busy) @(posedge clk);
    repeat (2 * BIT_CLKS) @(posedge clk);
    checks++;
    if (n_res != 2 * N_OUT) begin failures++; $display("FAIL %0d results of %0d", n_res, 2 * N_OUT); end
    checks++;
    if (start_bit_clks < BIT_CLKS - BIT_CLKS / 100 || start_bit_clks > BIT_CLKS + BIT_CLKS / 100) begin
      failures++; $display("FAIL bit time %0d clocks, expected about %0d", start_bit_clks, BIT_CLKS);
    end
    $display("bit time: %0d clocks (%0d ns)", start_bit_clks, start_bit_clks * 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
