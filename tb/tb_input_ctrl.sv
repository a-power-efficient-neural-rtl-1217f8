// tb_input_ctrl: feeds byte streams to the input buffer and control through
// a modelled RX FIFO (bytes trickle in at random times) with N_IN = 4 and
// N_OUT = 3. Checks:
//   - the model bytes become weight writes W[j][i] in neuron order, then
//     bias writes, and weights_loaded rises after the last bias;
//   - each vector lands in the input buffer (read back through x_rd_row,
//     one clock latency) and fc_start pulses once per vector;
//   - no byte is taken while a pass runs, and fc_start waits (stall high)
//     while send_busy is high;
//   - reload, given in the middle of a vector and during a pass, returns to
//     loading a new model and drops the partial vector.
module tb_input_ctrl;
  import fc_accel_pkg::*;
  localparam int N_IN = 4, N_OUT = 3;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       reload = 1'b0;
  logic [7:0] r_data;
  logic       rx_empty, rd_uart;
  logic       w_we, b_we;
  logic [1:0] w_row, x_rd_row = '0, w_col;
  fix16_t     w_data, x_out;
  logic       fc_start, fc_done = 1'b0, send_busy = 1'b0;
  logic       weights_loaded, stall;

  logic [7:0] fifo [$];
  bit         avail = 1'b0;     // byte visible to the DUT this clock
  fix16_t     wgot [N_OUT][N_IN];
  fix16_t     bgot [N_OUT];
  int         n_w = 0, n_b = 0, n_start = 0, n_stall = 0;
  bit         in_pass = 1'b0;
  int         checks = 0, failures = 0;

  input_ctrl #(.N_IN(N_IN), .N_OUT(N_OUT)) dut (.*);

  always #5 clk = ~clk;

  // RX FIFO model: a byte becomes visible only at random times
  assign rx_empty = !(avail && fifo.size() > 0);
  assign r_data   = fifo.size() > 0 ? fifo[0] : 8'h00;
  always @(posedge clk) begin
    if (rd_uart && !rx_empty) void'(fifo.pop_front());
    avail <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (w_we) begin wgot[w_col][w_row] = w_data; n_w++; end
    if (b_we) begin bgot[w_col] = w_data; n_b++; end
    if (fc_start) n_start++;
    if (stall) n_stall++;
    if (in_pass && rd_uart) begin failures++; $display("FAIL byte taken during a pass"); end
    if (fc_start && send_busy) begin failures++; $display("FAIL start while send_busy"); end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push_word(input fix16_t v);
    fifo.push_back(v[7:0]);
    fifo.push_back(v[15:8]);
  endtask

  task automatic load_model(output fix16_t w [N_OUT][N_IN], output fix16_t b [N_OUT]);
    for (int j = 0; j < N_OUT; j++)
      for (int i = 0; i < N_IN; i++) begin w[j][i] = fix16_t'($urandom); push_word(w[j][i]); end
    for (int j = 0; j < N_OUT; j++) begin b[j] = fix16_t'($urandom); push_word(b[j]); end
    wait (fifo.size() == 0);
    repeat (3) @(posedge clk);
    for (int j = 0; j < N_OUT; j++) begin
      checks++;
      if (bgot[j] !== b[j]) begin failures++; $display("FAIL bias %0d", j); end
      for (int i = 0; i < N_IN; i++) begin
        checks++;
        if (wgot[j][i] !== w[j][i]) begin
          failures++; $display("FAIL W[%0d][%0d] %h expected %h", j, i, wgot[j][i], w[j][i]);
        end
      end
    end
    checks++;
    if (!weights_loaded) begin failures++; $display("FAIL weights_loaded low"); end
  endtask

  // one vector; hold send_busy for `busy_clks` clocks around its end
  task automatic vector(input int busy_clks);
    fix16_t x [N_IN];
    int s0;
    s0 = n_start;
    send_busy = (busy_clks > 0);
    for (int i = 0; i < N_IN; i++) begin x[i] = fix16_t'($urandom); push_word(x[i]); end
    wait (fifo.size() == 0);
    repeat (busy_clks) @(posedge clk);
    @(negedge clk);
    send_busy = 1'b0;
    while (n_start == s0) @(negedge clk);
    in_pass = 1'b1;
    // the layer reads the buffer
    for (int i = 0; i < N_IN; i++) begin
      x_rd_row = 2'(i);
      @(negedge clk);
      checks++;
      if (x_out !== x[i]) begin failures++; $display("FAIL x[%0d]=%h expected %h", i, x_out, x[i]); end
    end
    // bytes of the next vector arriving now must wait
    fifo.push_back(8'h11);
    repeat (10) @(negedge clk);
    checks++;
    if (fifo.size() != 1) begin failures++; $display("FAIL byte consumed during pass"); end
    void'(fifo.pop_back());
    fc_done = 1'b1; @(negedge clk); fc_done = 1'b0;
    in_pass = 1'b0;
    checks++;
    if (n_start != s0 + 1) begin failures++; $display("FAIL %0d starts", n_start - s0); end
  endtask

  initial begin
    fix16_t w [N_OUT][N_IN];
    fix16_t b [N_OUT];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (weights_loaded) begin failures++; $display("FAIL loaded after reset"); end

    load_model(w, b);
    checks++;
    if (n_w != N_OUT * N_IN || n_b != N_OUT) begin
      failures++; $display("FAIL %0d weight and %0d bias writes", n_w, n_b);
    end
    vector(0);
    vector(0);
    vector(40);                      // stall on the result sender
    checks++;
    if (n_stall < 40) begin failures++; $display("FAIL stall seen %0d clocks", n_stall); end

    // reload in the middle of a vector: the half vector is dropped
    push_word(16'sh1234);
    wait (fifo.size() == 0);
    repeat (3) @(negedge clk);
    reload = 1'b1; @(negedge clk); reload = 1'b0;
    @(negedge clk);
    checks++;
    if (weights_loaded) begin failures++; $display("FAIL weights_loaded after reload"); end
    load_model(w, b);
    vector(0);

    // reload during a pass takes effect when the pass ends
    begin
      fix16_t x [N_IN];
      int s0;
      s0 = n_start;
      for (int i = 0; i < N_IN; i++) begin x[i] = fix16_t'($urandom); push_word(x[i]); end
      while (n_start == s0) @(negedge clk);
      reload = 1'b1; @(negedge clk); reload = 1'b0;
      repeat (5) @(negedge clk);
      checks++;
      if (!weights_loaded) begin failures++; $display("FAIL reload acted during a pass"); end
      fc_done = 1'b1; @(negedge clk); fc_done = 1'b0;
      repeat (2) @(negedge clk);
      checks++;
      if (weights_loaded) begin failures++; $display("FAIL pending reload lost"); end
    end
    load_model(w, b);
    vector(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
