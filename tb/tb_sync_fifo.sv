// tb_sync_fifo: random writes and reads against a queue reference model.
// Checks r_data on every read, the full and empty flags every clock, and
// that writes to a full FIFO are dropped.
module tb_sync_fifo;
  localparam int unsigned DW = 8, AW = 3, DEPTH = 8;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          wr = 1'b0, rd = 1'b0;
  logic [DW-1:0] w_data = '0, r_data;
  logic          full, empty;
  logic [DW-1:0] model [$];
  int            checks = 0, failures = 0;
  int            saw_full = 0, saw_drop = 0;

  sync_fifo #(.DATA_W(DW), .ADDR_W(AW)) dut (.*);

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
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // bias towards filling in the first half, draining in the second
      @(negedge clk);
      wr     = ($urandom_range(0, 99) < ((cyc % 400) < 200 ? 70 : 30));
      rd     = ($urandom_range(0, 99) < ((cyc % 400) < 200 ? 30 : 70));
      w_data = DW'($urandom);
      checks++;
      if (full != (model.size() == DEPTH) || empty != (model.size() == 0)) begin
        failures++;
        $display("FAIL flags full=%0b empty=%0b size=%0d", full, empty, model.size());
      end
      if (rd && model.size() > 0) begin
        checks++;
        if (r_data != model[0]) begin
          failures++;
          $display("FAIL r_data=%h expected=%h", r_data, model[0]);
        end
      end
      if (full) saw_full++;
      if (full && wr) saw_drop++;
      begin
        bit wr_ok, rd_ok;
        wr_ok = wr && (model.size() < DEPTH);
        rd_ok = rd && (model.size() > 0);
        @(posedge clk);
        if (rd_ok) void'(model.pop_front());
        if (wr_ok) model.push_back(w_data);
      end
    end
    checks++;
    if (saw_full == 0 || saw_drop == 0) begin
      failures++;
      $display("FAIL full=%0d drop=%0d never exercised", saw_full, saw_drop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
