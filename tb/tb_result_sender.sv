// tb_result_sender: loads random result vectors into the output buffer and
// collects the bytes written to a modelled TX FIFO whose `tx_full` is
// randomly asserted. Checks byte order (output 0 first, low byte first),
// the byte count, that nothing is written while full, that `busy` covers
// the transfer, that a load while busy is ignored, and that with room in
// the FIFO the 20 bytes go out on 20 consecutive clocks.
module tb_result_sender;
  import fc_accel_pkg::*;
  localparam int N_OUT = 10;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       load = 1'b0, busy, tx_full = 1'b0, wr_uart;
  logic [7:0] w_data;
  fix16_t     y [N_OUT];
  logic [7:0] got [$];
  int         checks = 0, failures = 0;
  int         full_rand = 0;

  result_sender dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (wr_uart) begin
      if (tx_full) begin failures++; $display("FAIL write while full"); end
      got.push_back(w_data);
    end
  end
  always @(negedge clk) tx_full <= (full_rand > 0) && ($urandom_range(0, 99) < full_rand);

  task automatic one(input int pfull, input bit disturb);
    fix16_t e [N_OUT];
    int t;
    full_rand = pfull;
    got.delete();
    for (int j = 0; j < N_OUT; j++) begin y[j] = fix16_t'($urandom); e[j] = y[j]; end
    @(negedge clk); load = 1'b1;
    @(negedge clk); load = 1'b0;
    if (disturb) begin
      // a second load while busy must not change the buffer
      for (int j = 0; j < N_OUT; j++) y[j] = fix16_t'($urandom);
      load = 1'b1; @(negedge clk); load = 1'b0;
    end
    t = 0;
    while (busy) begin @(negedge clk); t++; end
    checks++;
    if (got.size() != 2 * N_OUT) begin failures++; $display("FAIL %0d bytes", got.size()); end
    for (int j = 0; j < N_OUT && got.size() == 2 * N_OUT; j++) begin
      checks++;
      if ({got[2*j+1], got[2*j]} !== e[j]) begin
        failures++; $display("FAIL result %0d = %h expected %h", j, {got[2*j+1], got[2*j]}, e[j]);
      end
    end
    if (pfull == 0 && !disturb) begin
      checks++;
      if (t != 2 * N_OUT) begin failures++; $display("FAIL transfer took %0d clocks", t); end
    end
  endtask

  initial begin
    for (int j = 0; j < N_OUT; j++) y[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (busy || wr_uart) begin failures++; $display("FAIL active after reset"); end
    one(0, 0);
    for (int k = 0; k < 10; k++) one(60, k % 2);
    one(0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
