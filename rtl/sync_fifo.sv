// sync_fifo: first-in first-out buffer of the UART.
//
// Two of these cache the data of the UART: one between the receiver and the
// rest of the FPGA logic, one between the FPGA logic and the transmitter.
// It is a circular buffer of 2**ADDR_W words with a write and a read
// pointer and an occupancy count, in one clock domain.
//
// Interface (names as in the UART block diagram): `wr` with `w_data` stores
// a word unless `full`; `rd` removes the oldest word unless `empty`.
// `r_data` always shows the oldest word (first-word fall-through), so a
// reader samples `r_data` and asserts `rd` in the same cycle. A write to a
// full FIFO is dropped and a read of an empty one is ignored.
// Timing: a written word is visible on `r_data` the clock after the write;
// `full` and `empty` are registered-state flags.
// The FIFOs and their place follow the UART block diagram; depth, the
// fall-through read and the dropping of writes when full are this design's
// choices.
module sync_fifo #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr,
  input  logic [DATA_W-1:0] w_data,
  input  logic              rd,
  output logic [DATA_W-1:0] r_data,
  output logic              full,
  output logic              empty
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [ADDR_W-1:0] wptr, rptr;
  logic [ADDR_W:0]   count;
  logic              do_wr, do_rd;

  assign full   = (count == (ADDR_W+1)'(DEPTH));
  assign empty  = (count == '0);
  assign do_wr  = wr && !full;
  assign do_rd  = rd && !empty;
  assign r_data = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= w_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

endmodule
