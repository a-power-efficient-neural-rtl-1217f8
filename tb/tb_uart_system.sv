// tb_uart_system: the complete UART with its serial output looped back to
// its input. Words queued on the transmit side must come out of the
// receive side in order. Covers: TX FIFO full back-pressure, reading while
// receiving, the baud rate switch (frame period 160 ticks of 4 or 8
// clocks), RX FIFO overflow (words beyond 16 unread ones are lost), and
// the rx_err flag for a frame with a low stop bit driven by the testbench.
module tb_uart_system;
  import fc_accel_pkg::*;

  localparam int unsigned CLK_HZ = 16 * 19200 * 4;   // 4 clocks per tick at 19200

  logic       clk = 1'b0, rst_n = 1'b0;
  baud_sel_e  baud_sel = BAUD_19200;
  logic       rx, tx;
  logic       loop = 1'b1, tb_line = 1'b1;
  logic       rd_uart = 1'b0, wr_uart = 1'b0;
  logic [7:0] r_data, w_data = '0;
  logic       rx_empty, rx_full, rx_err, tx_full;
  int         checks = 0, failures = 0;
  int         n_full = 0, n_err = 0;
  logic [7:0] sent [$];

  uart_system #(.CLK_HZ(CLK_HZ)) dut (.*);

  assign rx = loop ? tx : tb_line;

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (tx_full) n_full++;
    if (rx_err) n_err++;
  end

  task automatic put(input logic [7:0] d);
    @(negedge clk);
    while (tx_full) @(negedge clk);
    wr_uart = 1'b1; w_data = d; sent.push_back(d);
    @(negedge clk);
    wr_uart = 1'b0;
  endtask

  task automatic get_check();
    @(negedge clk);
    while (rx_empty) @(negedge clk);
    checks++;
    if (sent.size() == 0 || r_data !== sent[0]) begin
      failures++; $display("FAIL received %h expected %h", r_data, sent.size() ? sent[0] : 8'h0);
    end
    if (sent.size() > 0) void'(sent.pop_front());
    rd_uart = 1'b1;
    @(negedge clk);
    rd_uart = 1'b0;
  endtask

  // frame period: distance between falling edges of tx for back-to-back
  // frames, within one clock of sampling uncertainty
  task automatic period_check(input int exp_clk);
    int t;
    @(negedge tx);
    t = 0;
    do begin @(posedge clk); t++; end while (tx !== 1'b0 || t < 9 * exp_clk / 10);
    checks++;
    if (t < exp_clk - 1 || t > exp_clk + 1) begin failures++; $display("FAIL frame period %0d expected %0d", t, exp_clk); end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);

    // 1: a few words, read after they arrived
    for (int k = 0; k < 10; k++) put(8'($urandom));
    repeat (12 * 640) @(posedge clk);
    for (int k = 0; k < 10; k++) get_check();

    // 2: a stream longer than the FIFOs, read while sending
    fork
      for (int k = 0; k < 40; k++) put(8'($urandom));
      for (int k = 0; k < 40; k++) get_check();
      period_check(160 * 4);
    join

    // 3: switch to 9600 baud
    baud_sel = BAUD_9600;
    repeat (20) @(posedge clk);
    fork
      for (int k = 0; k < 6; k++) put(8'($urandom));
      for (int k = 0; k < 6; k++) get_check();
      period_check(160 * 8);
    join
    baud_sel = BAUD_19200;
    repeat (20) @(posedge clk);

    // 4: overflow: 20 words, none read until all are sent; only 16 kept
    for (int k = 0; k < 20; k++) put(8'($urandom));
    repeat (22 * 640) @(posedge clk);
    checks++;
    if (!rx_full) begin failures++; $display("FAIL rx FIFO not full"); end
    for (int k = 0; k < 16; k++) get_check();
    checks++;
    if (!rx_empty) begin failures++; $display("FAIL more than 16 words kept"); end
    sent.delete();

    // 5: frame with a low stop bit from the testbench
    loop = 1'b0;
    tb_line = 1'b0; repeat (64) @(posedge clk);          // start
    for (int i = 0; i < 8; i++) begin tb_line = 1'(i % 2); repeat (64) @(posedge clk); end
    tb_line = 1'b0; repeat (64) @(posedge clk);          // bad stop bit
    tb_line = 1'b1; repeat (640) @(posedge clk);
    checks++;
    if (n_err != 1) begin failures++; $display("FAIL rx_err count %0d", n_err); end
    checks++;
    if (rx_empty || r_data !== 8'hAA) begin failures++; $display("FAIL errored word %h", r_data); end

    checks++;
    if (n_full == 0) begin failures++; $display("FAIL TX FIFO never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
