// host_tx_serializer: sends queued FPGA-to-host transfer batches one item
// per beat over the host link.
//
// A batch is one transfer decided by the table engine: a forwarded
// insertion or deletion (one item), a refill request (no item; the volume
// field carries how many items are wanted) or a spill of up to B cache
// items to the master table. The serializer reads the batch at the head of
// the FIFO, emits its beats in item order with tx_last on the final one and
// then pops it.
//
// Interface: in_valid/in_* is the FIFO head (first-word fall-through) and
// in_pop removes it. tx_* is a valid/ready stream; a beat moves when
// tx_valid && tx_ready, one beat per cycle at most.
//
// The source only says that transfers use PCIe with DMA; the beat format is
// this design's choice.
module host_tx_serializer
  import mdg_pkg::*;
#(
  parameter int TBL_W = 9,
  parameter int B     = 25
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  host_op_e                in_op,
  input  logic [TBL_W-1:0]        in_tbl,
  input  logic [$clog2(B+1)-1:0]  in_n,
  input  item_t [B-1:0]           in_items,
  output logic                    in_pop,
  output logic                    tx_valid,
  input  logic                    tx_ready,
  output host_op_e                tx_op,
  output logic [TBL_W-1:0]        tx_table,
  output key_t                    tx_key,
  output vol_t                    tx_vol,
  output logic                    tx_last
);

  localparam int CW = $clog2(B+1);

  logic [CW-1:0] idx;   // index of the item being sent
  logic [CW-1:0] nbeats;

  assign nbeats   = (in_op == H_INSERT) ? in_n : CW'(1);
  assign tx_valid = in_valid;
  assign tx_op    = in_op;
  assign tx_table = in_tbl;
  assign tx_last  = (idx == nbeats - 1'b1);
  assign in_pop   = tx_valid && tx_ready && tx_last;

  always_comb begin
    if (in_op == H_REFILL_REQ) begin
      tx_key = '0;
      tx_vol = vol_t'(in_n);
    end else begin
      tx_key = in_items[idx].key;
      tx_vol = in_items[idx].vol;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  idx <= '0;
    else if (tx_valid && tx_ready) idx <= tx_last ? '0 : idx + 1'b1;
  end

  // Insert batches always carry at least one item.
  a_batch_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (in_n != '0 || in_op == H_REFILL_REQ));

endmodule
