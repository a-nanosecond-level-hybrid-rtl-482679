// tb_mdg_hybrid_table_top: end-to-end test of the hybrid sorted table at a
// reduced size (cache tables of 16 slots, 4 books, 3 of them active), so
// that spills, refills, stalls and returned replies happen often. See
// mdg_tb_harness for the workload, the host model and the checks. The
// periodic snapshot runs every 1500 cycles here.
module tb_mdg_hybrid_table_top;
  import mdg_pkg::*;

  localparam int CACHE_SIZE   = 16;
  localparam int NUM_BOOKS    = 4;
  localparam int REFILL_LEVEL = 5;
  localparam int STALL_LEVEL  = 2;
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

  mdg_hybrid_table_top #(
    .CACHE_SIZE(CACHE_SIZE), .NUM_BOOKS(NUM_BOOKS), .REFILL_LEVEL(REFILL_LEVEL),
    .STALL_LEVEL(STALL_LEVEL), .PUB_DEPTH(PUB_DEPTH), .PUBLISH_PERIOD(1500)
  ) dut (.*);

  mdg_tb_harness #(
    .CACHE_SIZE(CACHE_SIZE), .NUM_BOOKS(NUM_BOOKS), .REFILL_LEVEL(REFILL_LEVEL),
    .STALL_LEVEL(STALL_LEVEL), .PUB_DEPTH(PUB_DEPTH), .ACTIVE_BOOKS(3),
    .N_BUILD(300), .N_MIX(600), .WATCHDOG(2_000_000), .AUTO_PUB(1'b1)
  ) harness (.*);

endmodule
