// tb_uart_tx: feeds words to two transmitters from reference queues (the
// way the TX FIFO does: tx_start = queue not empty, pop on tx_done_tick)
// and decodes their serial lines independently, sampling each bit in its
// middle.
//   dut8n1: 8 data bits, no parity, 1 stop bit
//   dut7e2: 7 data bits, even parity, 2 stop bits
// Checks every decoded word, parity bit and stop bit, and the frame period
// of back-to-back frames: 160 and 176 sampling ticks (4 clocks each).
module tb_uart_tx;
  import fc_accel_pkg::*;

  localparam int TDIV = 4;
  localparam int BIT  = 16 * TDIV;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       s_tick;
  int         tcnt = 0;
  logic [7:0] q8 [$];
  logic [6:0] q7 [$];
  logic [7:0] exp8 [$];
  logic [6:0] exp7 [$];
  logic       tx8, tx7, done8, done7;
  int         checks = 0, failures = 0;
  int         rx8 = 0, rx7 = 0;

  uart_tx dut8n1 (
    .clk, .rst_n, .tx_start(q8.size() > 0), .s_tick,
    .din(q8.size() > 0 ? q8[0] : 8'h00), .tx_done_tick(done8), .tx(tx8)
  );
  uart_tx #(.DATA_BITS(7), .PARITY(PAR_EVEN), .STOP_HALF_BITS(4)) dut7e2 (
    .clk, .rst_n, .tx_start(q7.size() > 0), .s_tick,
    .din(q7.size() > 0 ? q7[0] : 7'h00), .tx_done_tick(done7), .tx(tx7)
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

  // pop the queues on done; check the period between back-to-back frames
  int now = 0, last8 = -1, last7 = -1;
  bit b2b8 = 0, b2b7 = 0;
  always @(posedge clk) if (rst_n) begin
    now++;
    if (done8) begin
      if (b2b8 && last8 >= 0) begin
        checks++;
        if (now - last8 != 160 * TDIV) begin
          failures++; $display("FAIL 8n1 frame period %0d", now - last8);
        end
      end
      last8 = now;
      b2b8 = q8.size() > 1;
      void'(q8.pop_front());
    end
    if (done7) begin
      if (b2b7 && last7 >= 0) begin
        checks++;
        if (now - last7 != 176 * TDIV) begin
          failures++; $display("FAIL 7e2 frame period %0d", now - last7);
        end
      end
      last7 = now;
      b2b7 = q7.size() > 1;
      void'(q7.pop_front());
    end
  end

  // serial decoders
  initial begin : dec8
    logic [7:0] d;
    forever begin
      @(negedge tx8);
      repeat (BIT / 2) @(posedge clk);
      checks++;
      if (tx8 !== 1'b0) begin failures++; $display("FAIL 8n1 start bit"); end
      for (int i = 0; i < 8; i++) begin repeat (BIT) @(posedge clk); d[i] = tx8; end
      repeat (BIT) @(posedge clk);
      checks++;
      if (tx8 !== 1'b1) begin failures++; $display("FAIL 8n1 stop bit"); end
      checks++;
      if (exp8.size() == 0 || d !== exp8[0]) begin
        failures++; $display("FAIL 8n1 word %h exp %h size %0d t=%0d", d, exp8.size() ? exp8[0] : 0, exp8.size(), now);
      end
      if (exp8.size() > 0) void'(exp8.pop_front());
      rx8++;
    end
  end

  initial begin : dec7
    logic [6:0] d;
    logic       p;
    forever begin
      @(negedge tx7);
      repeat (BIT / 2) @(posedge clk);
      for (int i = 0; i < 7; i++) begin repeat (BIT) @(posedge clk); d[i] = tx7; end
      repeat (BIT) @(posedge clk); p = tx7;
      repeat (BIT) @(posedge clk);
      checks++;
      if (tx7 !== 1'b1) begin failures++; $display("FAIL 7e2 first stop bit"); end
      repeat (BIT) @(posedge clk);
      checks++;
      if (tx7 !== 1'b1) begin failures++; $display("FAIL 7e2 second stop bit"); end
      checks++;
      if (exp7.size() == 0 || d !== exp7[0] || (^d ^ p) !== 1'b0) begin
        failures++; $display("FAIL 7e2 word %h parity %0b", d, p);
      end
      if (exp7.size() > 0) void'(exp7.pop_front());
      rx7++;
    end
  end

  initial begin
    logic [7:0] d;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);
    checks++;
    if (tx8 !== 1'b1 || tx7 !== 1'b1) begin failures++; $display("FAIL line not idle high"); end
    // a burst of back-to-back words, then single words with gaps
    for (int k = 0; k < 12; k++) begin
      d = 8'($urandom);
      q8.push_back(d); exp8.push_back(d);
      q7.push_back(d[6:0]); exp7.push_back(d[6:0]);
    end
    wait (q8.size() == 0 && q7.size() == 0);
    for (int k = 0; k < 6; k++) begin
      repeat ($urandom_range(1, 300)) @(posedge clk);
      d = 8'($urandom);
      q8.push_back(d); exp8.push_back(d);
      q7.push_back(d[6:0]); exp7.push_back(d[6:0]);
    end
    wait (q8.size() == 0 && q7.size() == 0);
    repeat (3 * BIT) @(posedge clk);
    checks++;
    if (rx8 != 18 || rx7 != 18) begin
      failures++; $display("FAIL decoded %0d and %0d frames of 18", rx8, rx7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
