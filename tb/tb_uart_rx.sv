// tb_uart_rx: drives serial frames into two receivers and checks what they
// deliver.
//   dut8n1: 8 data bits, no parity, 1 stop bit (the system's format)
//   dut7o2: 7 data bits, odd parity, 1.5 stop bits
// The sampling tick comes every 4 clocks, so one bit lasts 64 clocks. Each
// received word, the one-clock done pulse, the parity and framing error
// flags and the time from start edge to done are checked. Frames are sent
// back to back, with random idle gaps and with a small baud mismatch.
module tb_uart_rx;
  import fc_accel_pkg::*;

  localparam int TDIV = 4;            // clocks per sampling tick
  localparam int BIT  = 16 * TDIV;    // clocks per bit

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       s_tick;
  logic       line8 = 1'b1, line7 = 1'b1;
  logic [7:0] dout8;
  logic [6:0] dout7;
  logic       done8, done7, perr8, perr7, ferr8, ferr7;
  int         tcnt = 0;
  int         checks = 0, failures = 0;

  uart_rx dut8n1 (
    .clk, .rst_n, .rx(line8), .s_tick, .dout(dout8), .rx_done_tick(done8),
    .parity_err(perr8), .frame_err(ferr8)
  );
  uart_rx #(.DATA_BITS(7), .PARITY(PAR_ODD), .STOP_HALF_BITS(3)) dut7o2 (
    .clk, .rst_n, .rx(line7), .s_tick, .dout(dout7), .rx_done_tick(done7),
    .parity_err(perr7), .frame_err(ferr7)
  );

  always #5 clk = ~clk;
  always_ff @(posedge clk) tcnt <= (tcnt == TDIV - 1) ? 0 : tcnt + 1;
  assign s_tick = (tcnt == TDIV - 1);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // done pulses seen, with the data and flags at the pulse
  int         n_done8 = 0, n_done7 = 0;
  logic [7:0] got8;  logic [6:0] got7;
  logic       gp8, gf8, gp7, gf7;
  int         t_done8, t_done7, now = 0;
  always @(posedge clk) if (rst_n) begin
    now++;
    if (done8) begin n_done8++; got8 = dout8; gp8 = perr8; gf8 = ferr8; t_done8 = now; end
    if (done7) begin n_done7++; got7 = dout7; gp7 = perr7; gf7 = ferr7; t_done7 = now; end
  end

  // send bits of `n` data bits, parity mode p (0 none, 1 odd good, 2 odd bad),
  // stop level `stop`, bit length `blen` clocks
  task automatic send(ref logic line, input logic [8:0] data, input int n,
                      input int p, input logic stop, input int blen, input int stop_len);
    line = 1'b0; repeat (blen) @(posedge clk);
    for (int i = 0; i < n; i++) begin line = data[i]; repeat (blen) @(posedge clk); end
    if (p != 0) begin
      line = ~(^data[6:0]) ^ (p == 2);
      repeat (blen) @(posedge clk);
    end
    line = stop; repeat (stop_len) @(posedge clk);
    line = 1'b1;
  endtask

  task automatic check8(input logic [7:0] exp_d, input logic exp_f, input int t0);
    // done is due 9.5 bits plus two synchronizer clocks after the start edge,
    // within one tick of alignment
    int lat;
    repeat (BIT) @(posedge clk);
    checks++;
    lat = t_done8 - t0;
    if (got8 !== exp_d || gf8 !== exp_f || gp8 !== 1'b0) begin
      failures++;
      $display("FAIL 8n1 got %h f=%0b p=%0b, expected %h f=%0b", got8, gf8, gp8, exp_d, exp_f);
    end
    checks++;
    if (lat < 9 * BIT + BIT / 2 - TDIV || lat > 9 * BIT + BIT / 2 + 2 * TDIV) begin
      failures++;
      $display("FAIL 8n1 latency %0d clocks", lat);
    end
  endtask

  initial begin
    int n_prev, t0, p;
    logic [7:0] d;
    logic [6:0] d7;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);

    // back-to-back random frames on the 8N1 receiver
    for (int k = 0; k < 40; k++) begin
      d = 8'($urandom);
      n_prev = n_done8;
      t0 = now;
      send(line8, {1'b0, d}, 8, 0, 1'b1, BIT, BIT);
      if (k % 3 == 0) repeat ($urandom_range(0, 200)) @(posedge clk);
      fork
        automatic logic [7:0] d_c = d;
        automatic int         t_c = t0;
        check8(d_c, 1'b0, t_c);
      join_none
    end
    repeat (2 * BIT) @(posedge clk);
    checks++;
    if (n_done8 != 40) begin failures++; $display("FAIL %0d frames of 40", n_done8); end

    // baud mismatch of about +-3 %
    for (int k = 0; k < 6; k++) begin
      d = 8'($urandom);
      t0 = now;
      send(line8, {1'b0, d}, 8, 0, 1'b1, (k % 2) ? BIT + 2 : BIT - 2, BIT);
      repeat (BIT) @(posedge clk);
      checks++;
      if (got8 !== d) begin failures++; $display("FAIL mismatch frame %h got %h", d, got8); end
    end

    // framing error: stop bit low
    d = 8'hA5;
    t0 = now;
    send(line8, {1'b0, d}, 8, 0, 1'b0, BIT, BIT);
    repeat (3 * BIT) @(posedge clk);
    checks++;
    if (!gf8 || got8 !== d) begin failures++; $display("FAIL frame error not flagged"); end

    // the low stop bit looks like a new start bit to the receiver: let
    // that frame pass before the glitch test
    repeat (12 * BIT) @(posedge clk);

    // glitch shorter than half a bit: no frame
    n_prev = n_done8;
    line8 = 1'b0; repeat (BIT / 4) @(posedge clk); line8 = 1'b1;
    repeat (12 * BIT) @(posedge clk);
    checks++;
    if (n_done8 != n_prev) begin failures++; $display("FAIL glitch accepted as a frame"); end

    // 7 data bits, odd parity, 1.5 stop bits
    for (int k = 0; k < 20; k++) begin
      d7 = 7'($urandom);
      p = (k % 4 == 3) ? 2 : 1;
      n_prev = n_done7;
      send(line7, {2'b0, d7}, 7, p, 1'b1, BIT, BIT + BIT / 2);
      repeat (BIT) @(posedge clk);
      checks++;
      if (n_done7 != n_prev + 1 || got7 !== d7 || gp7 !== (p == 2) || gf7) begin
        failures++;
        $display("FAIL 7o2 got %h p=%0b f=%0b expected %h p=%0b", got7, gp7, gf7, d7, p == 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
