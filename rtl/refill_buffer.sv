// refill_buffer: collects one bulk refill sent by the host master table.
//
// When a cache table runs low the engine asks the host for the B smallest
// items of that side's master table. The reply arrives as beats on the rx
// stream, ascending by key, all for one table, with rx_last on the final
// beat. The final beat also carries the new smallest master key (rx_ms) and
// a flag telling that the master table is now empty. A reply may hold no
// item (rx_item = 0 on its only beat). Once complete, the buffer holds the
// reply (full = 1) and refuses further beats until the engine merges it and
// pulses consume.
//
// Interface: rx_valid/rx_ready stream in, full/table/n/items/ms/master_empty
// out to the engine, consume in.
//
// The source gives the refill (half a table, from the head of the master
// table) but no transfer format; buffering one reply at a time is this
// design's choice.
module refill_buffer
  import mdg_pkg::*;
#(
  parameter int TBL_W = 9,
  parameter int B     = 25
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   rx_valid,
  output logic                   rx_ready,
  input  logic [TBL_W-1:0]       rx_table,
  input  logic                   rx_item,
  input  key_t                   rx_key,
  input  vol_t                   rx_vol,
  input  logic                   rx_last,
  input  key_t                   rx_ms,
  input  logic                   rx_master_empty,
  output logic                   full,
  output logic [TBL_W-1:0]       table_id,
  output logic [$clog2(B+1)-1:0] n,
  output item_t [B-1:0]          items,
  output key_t                   ms,
  output logic                   master_empty,
  input  logic                   consume
);

  assign rx_ready = !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full         <= 1'b0;
      n            <= '0;
      table_id     <= '0;
      ms           <= '0;
      master_empty <= 1'b1;
    end else if (consume) begin
      full <= 1'b0;
      n    <= '0;
    end else if (rx_valid && rx_ready) begin
      table_id <= rx_table;
      if (rx_item && n < ($clog2(B+1))'(B)) n <= n + 1'b1;
      if (rx_last) begin
        full         <= 1'b1;
        ms           <= rx_ms;
        master_empty <= rx_master_empty;
      end
    end
  end

  always_ff @(posedge clk)
    if (rx_valid && rx_ready && rx_item && n < ($clog2(B+1))'(B))
      items[n] <= '{key: rx_key, vol: rx_vol};

  a_reply_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (rx_valid && rx_ready && rx_item) |-> n < ($clog2(B+1))'(B));
  a_consume_full: assert property (@(posedge clk) disable iff (!rst_n)
    consume |-> full);

endmodule
