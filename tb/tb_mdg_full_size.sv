// tb_mdg_full_size: end-to-end test of the hybrid sorted table at its
// default size (cache tables of 50 slots, 200 books, refill below 10 items,
// stall at 5). Traffic goes to 4 books spread over the book range; the rest
// must stay untouched. See mdg_tb_harness for the workload, the host model
// and the checks.
module tb_mdg_full_size;
  import mdg_pkg::*;

  localparam int CACHE_SIZE   = 50;
  localparam int NUM_BOOKS    = 200;
  localparam int REFILL_LEVEL = 10;
  localparam int STALL_LEVEL  = 5;
  localparam int PUB_DEPTH    = 5;
  localparam int TBL_W        = clog2_min1(2 * NUM_BOOKS);
  localparam int BOOK_W       = clog2_min1(NUM_BOOKS);

  logic clk, rst_n, init_done;
  logic msg_valid, msg_ready;
  op_e msg_op;
  logic [BOOK_W-1:0] msg_book;
  side_e msg_side;
  key_t msg_price;
  vol_t msg_vol;
  logic res_valid, res_auto, pub_enable;
  op_e res_op;
  logic [BOOK_W-1:0] res_book;
  side_e res_side;
  logic res_to_master, res_found;
  entry_t [PUB_DEPTH-1:0] res_levels;
  logic tx_valid, tx_ready, tx_last;
  host_op_e tx_op;
  logic [TBL_W-1:0] tx_table;
  key_t tx_key;
  vol_t tx_vol;
  logic rx_valid, rx_ready, rx_item, rx_last, rx_master_empty;
  logic [TBL_W-1:0] rx_table;
  key_t rx_key, rx_ms;
  vol_t rx_vol;
  logic ev_forward, ev_spill, ev_refill_req, ev_merge, ev_return, ev_stall;

  mdg_hybrid_table_top dut (.*);

  mdg_tb_harness #(
    .CACHE_SIZE(CACHE_SIZE), .NUM_BOOKS(NUM_BOOKS), .REFILL_LEVEL(REFILL_LEVEL),
    .STALL_LEVEL(STALL_LEVEL), .PUB_DEPTH(PUB_DEPTH), .ACTIVE_BOOKS(4),
    .N_BUILD(1000), .N_MIX(1500), .WATCHDOG(2_000_000)
  ) harness (.*);

endmodule
