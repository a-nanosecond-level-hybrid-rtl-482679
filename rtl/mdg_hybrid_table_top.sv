// mdg_hybrid_table_top: FPGA side of the CPU-FPGA hybrid sorted table used
// by a market data generator to keep order books.
//
// Each book side is split in two sorted tables whose concatenation is the
// whole side: a small cache table on chip holding the best prices, and a
// master table on the host holding everything behind it. This block holds
// the cache tables of NUM_BOOKS books (two sides each) and runs the order
// routines on them with a few tens of cycles latency; it talks to the host
// master table over two streams:
//
//   tx (FPGA -> host): forwarded orders, spilled items and refill requests,
//     queued in a TX_FIFO_DEPTH batch FIFO so the engine never waits for the
//     link, then sent one item per beat.
//   rx (host -> FPGA): refill replies, collected by refill_buffer and merged
//     by the engine between messages.
//
// While pub_enable is high, publish_scheduler requests a top-of-book publish
// of every book side once per PUBLISH_PERIOD cycles (the market data
// snapshot). Its requests share the engine with the order input, taking
// turns when both wait; their results carry res_auto = 1.
//
// Keys on the host link are stored keys: the ask price, or the bitwise
// inverse of the bid price, so the master table of every side is ascending.
// tx_vol of a refill request is the number of items wanted. A refill reply
// must be ascending, hold at most CACHE_SIZE/2 items and end with rx_last;
// its last beat carries the new smallest master key (rx_ms) and whether the
// master table is now empty.
//
// The split into engine, FIFO, serializer and refill buffer follows the
// source's description of the data flow; the stream formats, the FIFO depth
// and the event outputs are this design's choices. The host link hardware
// (PCIe/DMA), the off-chip FIFO and the master table itself are outside this
// block.
module mdg_hybrid_table_top
  import mdg_pkg::*;
#(
  parameter int CACHE_SIZE    = 50,
  parameter int NUM_BOOKS     = 200,
  parameter int REFILL_LEVEL  = 10,
  parameter int STALL_LEVEL   = 5,
  parameter int PUB_DEPTH     = 5,
  parameter int TX_FIFO_DEPTH = 16,
  parameter int PUBLISH_PERIOD = 80_000_000,  // 2 snapshots/s at 160 MHz
  // derived, do not override
  parameter int TBL_W         = clog2_min1(2 * NUM_BOOKS),
  parameter int BOOK_W        = clog2_min1(NUM_BOOKS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic                   init_done,
  input  logic                   pub_enable,
  // order messages
  input  logic                   msg_valid,
  output logic                   msg_ready,
  input  op_e                    msg_op,
  input  logic [BOOK_W-1:0]      msg_book,
  input  side_e                  msg_side,
  input  key_t                   msg_price,
  input  vol_t                   msg_vol,
  // results / market data
  output logic                   res_valid,
  output logic                   res_auto,
  output op_e                    res_op,
  output logic [BOOK_W-1:0]      res_book,
  output side_e                  res_side,
  output logic                   res_to_master,
  output logic                   res_found,
  output entry_t [PUB_DEPTH-1:0] res_levels,
  // to host master table
  output logic                   tx_valid,
  input  logic                   tx_ready,
  output host_op_e               tx_op,
  output logic [TBL_W-1:0]       tx_table,
  output key_t                   tx_key,
  output vol_t                   tx_vol,
  output logic                   tx_last,
  // from host master table
  input  logic                   rx_valid,
  output logic                   rx_ready,
  input  logic [TBL_W-1:0]       rx_table,
  input  logic                   rx_item,
  input  key_t                   rx_key,
  input  vol_t                   rx_vol,
  input  logic                   rx_last,
  input  key_t                   rx_ms,
  input  logic                   rx_master_empty,
  // monitoring pulses
  output logic                   ev_forward,
  output logic                   ev_spill,
  output logic                   ev_refill_req,
  output logic                   ev_merge,
  output logic                   ev_return,
  output logic                   ev_stall
);

  localparam int HALF = CACHE_SIZE / 2;
  localparam int B    = CACHE_SIZE - HALF;
  localparam int NW   = $clog2(B + 1);

  typedef struct packed {
    host_op_e         op;
    logic [TBL_W-1:0] tbl;
    logic [NW-1:0]    n;
    item_t [B-1:0]    items;
  } batch_t;

  batch_t           hb_in, hb_out;
  logic             hb_push, hb_full, hb_pop, hb_empty;

  logic             rf_full, rf_consume, rf_master_empty;
  logic [TBL_W-1:0] rf_table;
  logic [NW-1:0]    rf_n;
  item_t [B-1:0]    rf_items;
  key_t             rf_ms;

  // --- periodic snapshot requests, merged with the order input ---
  logic             pub_valid, pub_ready, pub_turn, grant_pub;
  logic [TBL_W-1:0] pub_table;
  logic             eng_valid, eng_ready;
  op_e              eng_op;
  logic [BOOK_W-1:0] eng_book;
  side_e            eng_side;

  publish_scheduler #(.NUM_TABLES(2 * NUM_BOOKS), .PERIOD(PUBLISH_PERIOD)) u_pub (
    .clk, .rst_n, .enable(pub_enable && init_done),
    .req_valid(pub_valid), .req_ready(pub_ready), .req_table(pub_table)
  );

  // The scheduler wins when the order input is idle or when it is its turn;
  // after every accepted message the turn passes to the other source.
  assign grant_pub = pub_valid && (pub_turn || !msg_valid);
  assign eng_valid = msg_valid || pub_valid;
  assign eng_op    = grant_pub ? OP_PUBLISH : msg_op;
  assign eng_book  = grant_pub ? BOOK_W'(pub_table >> 1) : msg_book;
  assign eng_side  = grant_pub ? side_e'(pub_table[0]) : msg_side;
  assign msg_ready = eng_ready && !(pub_valid && pub_turn);
  assign pub_ready = eng_ready && grant_pub;

  // The engine has one message in flight at a time and drives res_* before
  // it accepts the next, so one tag register follows the message.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pub_turn <= 1'b0;
      res_auto <= 1'b0;
    end else if (eng_valid && eng_ready) begin
      pub_turn <= !grant_pub;
      res_auto <= grant_pub;
    end
  end

  hybrid_table_engine #(
    .CACHE_SIZE(CACHE_SIZE), .NUM_BOOKS(NUM_BOOKS), .REFILL_LEVEL(REFILL_LEVEL),
    .STALL_LEVEL(STALL_LEVEL), .PUB_DEPTH(PUB_DEPTH)
  ) u_engine (
    .clk, .rst_n, .init_done,
    .msg_valid(eng_valid), .msg_ready(eng_ready), .msg_op(eng_op), .msg_book(eng_book),
    .msg_side(eng_side), .msg_price, .msg_vol,
    .res_valid, .res_op, .res_book, .res_side, .res_to_master, .res_found, .res_levels,
    .hb_push, .hb_full, .hb_op(hb_in.op), .hb_tbl(hb_in.tbl), .hb_n(hb_in.n),
    .hb_items(hb_in.items),
    .rf_full, .rf_table, .rf_n, .rf_items, .rf_ms, .rf_master_empty, .rf_consume,
    .ev_forward, .ev_spill, .ev_refill_req, .ev_merge, .ev_return, .ev_stall
  );

  sync_fifo #(.DEPTH(TX_FIFO_DEPTH), .T(batch_t)) u_tx_fifo (
    .clk, .rst_n, .push(hb_push), .wr_data(hb_in), .full(hb_full),
    .pop(hb_pop), .rd_data(hb_out), .empty(hb_empty)
  );

  host_tx_serializer #(.TBL_W(TBL_W), .B(B)) u_tx (
    .clk, .rst_n, .in_valid(!hb_empty), .in_op(hb_out.op), .in_tbl(hb_out.tbl),
    .in_n(hb_out.n), .in_items(hb_out.items), .in_pop(hb_pop),
    .tx_valid, .tx_ready, .tx_op, .tx_table, .tx_key, .tx_vol, .tx_last
  );

  refill_buffer #(.TBL_W(TBL_W), .B(B)) u_rx (
    .clk, .rst_n, .rx_valid, .rx_ready, .rx_table, .rx_item, .rx_key, .rx_vol,
    .rx_last, .rx_ms, .rx_master_empty,
    .full(rf_full), .table_id(rf_table), .n(rf_n), .items(rf_items), .ms(rf_ms),
    .master_empty(rf_master_empty), .consume(rf_consume)
  );

endmodule
