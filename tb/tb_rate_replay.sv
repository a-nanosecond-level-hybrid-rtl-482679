// tb_rate_replay: workload test at the default parameters (cache tables of
// 50 slots, refill below 10 items, stall at 5). One session-shaped sequence
// of about 750 orders on one book side is replayed at a low message rate and
// at a high one. At low rate every refill completes between messages and no
// message stalls; at high rate a run of deletions outpaces a slow host, the
// engine stalls and one result comes out late. Results are also checked
// against a golden book. See mdg_tb_harness (REPLAY) for details.
module tb_rate_replay;
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
    .WATCHDOG(2_000_000), .REPLAY(1'b1), .REPLAY_LEN(750)
  ) harness (.*);

  // outer time limit, in case the harness itself hangs
  initial begin
    #100ms;
    $display("TB_RESULT checks=%0d failures=%0d", harness.checks, harness.failures + 1);
    $finish;
  end

endmodule
