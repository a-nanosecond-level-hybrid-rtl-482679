// sync_fifo: single-clock FIFO of DEPTH words of type T.
//
// Buffers transfers from the table engine to the host so that moving items
// from the cache table to the master table never waits for the link. It is
// the on-chip front of the large off-chip FIFO the source places in card
// memory; its depth is this design's choice.
//
// Interface: push when !full, pop when !empty; rd_data shows the oldest word
// (first-word fall-through). Pushing into a full or popping from an empty
// FIFO is an error and is checked by assertions.
module sync_fifo #(
  parameter int  DEPTH = 16,
  parameter type T     = logic [7:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     wr_data,
  output logic full,
  input  logic pop,
  output T     rd_data,
  output logic empty
);

  localparam int AW = (DEPTH <= 2) ? 1 : $clog2(DEPTH);

  T                mem [DEPTH];
  logic [AW-1:0]   wptr, rptr;
  logic [AW:0]     count;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rptr];

  always_ff @(posedge clk) if (push && !full) mem[wptr] <= wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push && !full)
        wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (pop && !empty)
        rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(push && !full) - (AW+1)'(pop && !empty);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop  |-> !empty);

endmodule
