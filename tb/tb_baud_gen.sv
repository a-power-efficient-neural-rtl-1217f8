// tb_baud_gen: checks the tick period of the baud rate generator for all
// four rates. With CLK_HZ = 16 * 19200 * 4 the expected divisors are
// 4, 8, 16 and 32 clocks for 19200, 9600, 4800 and 2400 baud; the check
// measures the distance between consecutive ticks and that each tick lasts
// one clock.
module tb_baud_gen;
  import fc_accel_pkg::*;

  localparam int unsigned CLK_HZ = 16 * 19200 * 4;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  baud_sel_e baud_sel = BAUD_19200;
  logic      tick;
  int        checks = 0, failures = 0;

  baud_gen #(.CLK_HZ(CLK_HZ)) dut (.clk, .rst_n, .baud_sel, .tick);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input baud_sel_e sel, input int expected);
    int last_t, t, n;
    baud_sel = sel;
    // skip the first tick after a switch
    do @(posedge clk); while (!tick);
    last_t = 0; t = 0; n = 0;
    while (n < 8) begin
      @(posedge clk); t++;
      if (tick) begin
        checks++;
        if (t - last_t != expected) begin
          failures++;
          $display("FAIL sel=%0d period=%0d expected=%0d", sel, t - last_t, expected);
        end
        last_t = t; n++;
        @(posedge clk); t++;
        checks++;
        if (tick) begin failures++; $display("FAIL tick longer than one clock"); end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    measure(BAUD_19200, 4);
    measure(BAUD_9600, 8);
    measure(BAUD_4800, 16);
    measure(BAUD_2400, 32);
    measure(BAUD_19200, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
