// tb_weight_mem: fills the weight and bias store with random values, then
// reads every row and compares all N_OUT weights (one clock read latency)
// and the biases with a reference copy kept by the testbench.
module tb_weight_mem;
  import fc_accel_pkg::*;
  localparam int unsigned N_IN = 64, N_OUT = 10;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       w_we = 1'b0, b_we = 1'b0;
  logic [5:0] w_row = '0, rd_row = '0;
  logic [3:0] w_col = '0, b_col = '0;
  fix16_t     w_data = '0;
  fix16_t     rd_w [N_OUT];
  fix16_t     bias [N_OUT];
  fix16_t     ref_w [N_OUT][N_IN];
  fix16_t     ref_b [N_OUT];
  int         checks = 0, failures = 0;

  weight_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // reset value of the biases
    @(negedge clk);
    for (int j = 0; j < N_OUT; j++) begin
      checks++;
      if (bias[j] != 0) begin failures++; $display("FAIL bias %0d not reset", j); end
    end
    for (int j = 0; j < N_OUT; j++)
      for (int i = 0; i < N_IN; i++) begin
        @(negedge clk);
        w_we = 1'b1; w_row = 6'(i); w_col = 4'(j);
        w_data = fix16_t'($urandom); ref_w[j][i] = w_data;
      end
    @(negedge clk); w_we = 1'b0;
    for (int j = 0; j < N_OUT; j++) begin
      @(negedge clk);
      b_we = 1'b1; b_col = 4'(j);
      w_data = fix16_t'($urandom); ref_b[j] = w_data;
    end
    @(negedge clk); b_we = 1'b0;
    // overwrite one weight, check it replaces only its own cell
    w_we = 1'b1; w_row = 6'd5; w_col = 4'd3; w_data = 16'sh1234; ref_w[3][5] = 16'sh1234;
    @(negedge clk); w_we = 1'b0;
    for (int i = N_IN - 1; i >= 0; i--) begin
      rd_row = 6'(i);
      @(posedge clk); #1;
      for (int j = 0; j < N_OUT; j++) begin
        checks++;
        if (rd_w[j] != ref_w[j][i]) begin
          failures++;
          $display("FAIL W[%0d][%0d]=%h expected %h", j, i, rd_w[j], ref_w[j][i]);
        end
      end
      @(negedge clk);
    end
    for (int j = 0; j < N_OUT; j++) begin
      checks++;
      if (bias[j] != ref_b[j]) begin
        failures++;
        $display("FAIL b[%0d]=%h expected %h", j, bias[j], ref_b[j]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
