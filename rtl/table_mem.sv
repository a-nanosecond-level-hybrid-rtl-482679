// table_mem: on-chip RAM holding the cache tables of all order-book sides.
//
// One word stores a whole table and its synchronisation state, so a routine
// reads or writes a table in a single access, the way several block RAMs
// side by side give one wide port. Only this memory grows with the number of
// books; the routines are shared, matching the resource behaviour reported
// for the design (logic constant, block RAM linear in the number of books).
//
// Interface: synchronous read (rd_data valid the cycle after rd_en) and a
// synchronous write port. Reading and writing the same word in one cycle
// returns the old word. No reset: the engine clears every word after reset.
module table_mem #(
  parameter int  DEPTH = 400,
  parameter type T     = logic [7:0]
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output T                         rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  T                         wr_data
);

  T mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
