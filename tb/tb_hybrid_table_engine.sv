// tb_hybrid_table_engine: directed test of the routine engine with small
// tables (8 slots, refill below 3 items, stall at 1), the host side driven
// by the testbench. It walks through: filling a table until it spills its
// upper half, forwarding an order at or above the master's smallest key,
// adding to an existing key, select and publish, deletions down to a refill
// request, a deletion that stalls until the refill reply is merged, bid
// ordering (highest price first), and a reply that comes back to the host
// because the table regrew meanwhile. Expected tables, batches and
// latencies (2 cycles, or 3 + 6 sorter layers) are written out by hand.
module tb_hybrid_table_engine;
  import mdg_pkg::*;

  localparam int CACHE_SIZE = 8;
  localparam int NUM_BOOKS  = 2;
  localparam int PUB_DEPTH  = 5;
  localparam int TBL_W      = 2;
  localparam int BOOK_W     = 1;
  localparam int B          = 4;
  localparam int NW         = 3;
  localparam int LAT_SORT   = 3 + 6;
  localparam int LAT_FAST   = 2;

  logic clk = 1'b0, rst_n = 1'b0, init_done;
  logic msg_valid, msg_ready;
  op_e msg_op;
  logic [BOOK_W-1:0] msg_book;
  side_e msg_side;
  key_t msg_price;
  vol_t msg_vol;
  logic res_valid, res_to_master, res_found;
  op_e res_op;
  logic [BOOK_W-1:0] res_book;
  side_e res_side;
  entry_t [PUB_DEPTH-1:0] res_levels;
  logic hb_push, hb_full;
  host_op_e hb_op;
  logic [TBL_W-1:0] hb_tbl;
  logic [NW-1:0] hb_n;
  item_t [B-1:0] hb_items;
  logic rf_full, rf_master_empty, rf_consume;
  logic [TBL_W-1:0] rf_table;
  logic [NW-1:0] rf_n;
  item_t [B-1:0] rf_items;
  key_t rf_ms;
  logic ev_forward, ev_spill, ev_refill_req, ev_merge, ev_return, ev_stall;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  hybrid_table_engine #(
    .CACHE_SIZE(CACHE_SIZE), .NUM_BOOKS(NUM_BOOKS), .REFILL_LEVEL(3),
    .STALL_LEVEL(1), .PUB_DEPTH(PUB_DEPTH)
  ) dut (.*);

  // batches pushed toward the host
  typedef struct { host_op_e op; int tbl; int n; item_t it[B]; } batch_t;
  batch_t hq[$];
  int n_stall = 0, n_merge = 0, n_return = 0;
  always @(posedge clk) begin
    if (hb_push) begin
      batch_t b;
      b.op = hb_op; b.tbl = int'(hb_tbl); b.n = int'(hb_n);
      for (int i = 0; i < B; i++) b.it[i] = hb_items[i];
      hq.push_back(b);
    end
    if (ev_stall)  n_stall++;
    if (ev_merge)  n_merge++;
    if (ev_return) n_return++;
  end

  // last result
  entry_t [PUB_DEPTH-1:0] r_lv;
  logic r_fwd, r_found;
  longint r_lat;

  task automatic fail(string s);
    failures++;
    $display("ERROR: %s", s);
  endtask

  // send one message and wait for its result (no check of latency if stalls)
  task automatic send(op_e op, side_e side, key_t price, vol_t v, int max_wait = 200);
    longint t0;
    int w = 0;
    @(negedge clk);
    msg_valid = 1; msg_op = op; msg_book = 0; msg_side = side;
    msg_price = price; msg_vol = v;
    while (!msg_ready) @(negedge clk);
    t0 = cycle;
    @(posedge clk); #1 msg_valid = 0;
    while (!res_valid && w < max_wait) begin @(posedge clk); #1; w++; end
    r_lv = res_levels; r_fwd = res_to_master; r_found = res_found;
    r_lat = cycle - t0;
  endtask

  // expect the cached ask book to show these keys (volumes in v)
  task automatic expect_levels(string what, int k[], int v[]);
    checks++;
    for (int i = 0; i < PUB_DEPTH; i++) begin
      if (i < k.size()) begin
        if (!r_lv[i].valid || r_lv[i].key != key_t'(k[i]) || r_lv[i].vol != vol_t'(v[i])) begin
          fail($sformatf("%s: level %0d is %0d/%0d want %0d/%0d", what, i,
                         r_lv[i].key, r_lv[i].vol, k[i], v[i]));
          return;
        end
      end else if (r_lv[i].valid) begin
        fail($sformatf("%s: extra level %0d", what, i));
        return;
      end
    end
  endtask

  task automatic expect_lat(string what, longint want);
    checks++;
    if (r_lat != want) fail($sformatf("%s: latency %0d want %0d", what, r_lat, want));
  endtask

  task automatic expect_batch(string what, host_op_e op, int n, int k0);
    batch_t b;
    checks++;
    if (hq.size() != 1) begin
      fail($sformatf("%s: %0d batches", what, hq.size()));
      hq.delete();
      return;
    end
    b = hq.pop_front();
    if (b.op != op || b.n != n) begin
      fail($sformatf("%s: batch op %0d n %0d", what, b.op, b.n));
      return;
    end
    if (op != H_REFILL_REQ)
      for (int i = 0; i < n; i++)
        if (b.it[i].key != key_t'(k0 + i)) fail($sformatf("%s: item %0d key %0d", what, i, b.it[i].key));
  endtask

  initial begin
    msg_valid = 0; msg_op = OP_INSERT; msg_book = 0; msg_side = SIDE_ASK;
    msg_price = '0; msg_vol = '0; hb_full = 0;
    rf_full = 0; rf_table = '0; rf_n = '0; rf_items = '0; rf_ms = '0; rf_master_empty = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (init_done);

    // 1. fill the ask side with 17, 16, ..., 10 (reverse order), volume 1
    for (int k = 17; k >= 11; k--) send(OP_INSERT, SIDE_ASK, key_t'(k), 1);
    expect_levels("seven inserts", '{11, 12, 13, 14, 15}, '{1, 1, 1, 1, 1});
    expect_lat("insert", LAT_SORT);
    checks++; if (hq.size() != 0) fail("early batch");
    send(OP_INSERT, SIDE_ASK, 10, 1);            // eighth: table full -> spill 14..17
    expect_levels("after spill", '{10, 11, 12, 13}, '{1, 1, 1, 1});
    expect_batch("spill", H_INSERT, 4, 14);
    expect_lat("insert with spill", LAT_SORT);

    // 2. key >= M_s (14) goes to the master table
    send(OP_INSERT, SIDE_ASK, 20, 7);
    checks++; if (!r_fwd) fail("not forwarded");
    expect_batch("forward", H_INSERT, 1, 20);
    expect_lat("forward", LAT_FAST);
    send(OP_DELETE, SIDE_ASK, 14, 1);
    expect_batch("forward delete", H_DELETE, 1, 14);

    // 3. add to an existing key
    send(OP_INSERT, SIDE_ASK, 11, 5);
    checks++; if (!r_found) fail("existing key not found");
    expect_levels("add", '{10, 11, 12, 13}, '{1, 6, 1, 1});

    // 4. select and publish
    send(OP_SELECT, SIDE_ASK, 0, 0);
    expect_levels("select", '{10}, '{1});
    expect_lat("select", LAT_FAST);
    send(OP_PUBLISH, SIDE_ASK, 0, 0);
    expect_levels("publish", '{10, 11, 12, 13}, '{1, 6, 1, 1});
    expect_lat("publish", LAT_FAST);

    // 5. deletions: partial, then emptying 10 and 11 -> 2 left -> refill request
    send(OP_DELETE, SIDE_ASK, 11, 2);
    expect_levels("partial delete", '{10, 11, 12, 13}, '{1, 4, 1, 1});
    send(OP_DELETE, SIDE_ASK, 10, 1);
    expect_levels("delete 10", '{11, 12, 13}, '{4, 1, 1});
    checks++; if (hq.size() != 0) fail("request too early");
    send(OP_DELETE, SIDE_ASK, 11, 9);
    expect_levels("delete 11", '{12, 13}, '{1, 1});
    expect_batch("refill request", H_REFILL_REQ, 4, 0);
    send(OP_DELETE, SIDE_ASK, 5, 1);             // missing key below M_s: no change
    checks++; if (r_found) fail("missing key found");
    send(OP_DELETE, SIDE_ASK, 12, 1);            // 2 -> 1 item, no stall yet
    expect_levels("delete 12", '{13}, '{1});

    // 6. at 1 item with the refill pending, a deletion stalls
    fork
      send(OP_DELETE, SIDE_ASK, 13, 1, 2000);
      begin
        repeat (60) @(posedge clk);
        checks++;
        if (n_stall == 0) fail("deletion did not stall");
        if (res_valid) fail("result during stall");
        @(negedge clk);
        rf_full = 1; rf_table = 2'd1; rf_n = 3'd3; rf_ms = 21; rf_master_empty = 0;
        rf_items[0] = '{key: 15, vol: 2};
        rf_items[1] = '{key: 16, vol: 3};
        rf_items[2] = '{key: 17, vol: 4};
        while (!rf_consume) @(negedge clk);
        @(negedge clk);
        rf_full = 0;
      end
    join
    checks++; if (n_merge != 1) fail("no merge");
    expect_levels("after merge and stalled delete", '{15, 16, 17}, '{2, 3, 4});
    send(OP_INSERT, SIDE_ASK, 20, 1);            // 20 < new M_s 21: cache
    checks++; if (r_fwd) fail("20 should now stay on chip");
    expect_levels("after refill", '{15, 16, 17, 20}, '{2, 3, 4, 1});

    // 7. bid side: best is the highest price
    send(OP_INSERT, SIDE_BID, 100, 1);
    send(OP_INSERT, SIDE_BID, 105, 2);
    send(OP_INSERT, SIDE_BID, 102, 3);
    send(OP_SELECT, SIDE_BID, 0, 0);
    expect_levels("bid select", '{105}, '{2});
    send(OP_PUBLISH, SIDE_BID, 0, 0);
    expect_levels("bid publish", '{105, 102, 100}, '{2, 3, 1});

    // 8. a reply that no longer fits goes back: ask side has 4 items (>= half)
    send(OP_DELETE, SIDE_ASK, 15, 2);            // 3 left, refill level is < 3
    send(OP_DELETE, SIDE_ASK, 16, 3);            // 2 left -> request
    expect_batch("second request", H_REFILL_REQ, 4, 0);
    send(OP_INSERT, SIDE_ASK, 1, 1);
    send(OP_INSERT, SIDE_ASK, 2, 1);             // 4 items now
    @(negedge clk);
    rf_full = 1; rf_table = 2'd1; rf_n = 3'd2; rf_ms = 30; rf_master_empty = 0;
    rf_items[0] = '{key: 21, vol: 1};
    rf_items[1] = '{key: 22, vol: 1};
    while (!rf_consume) @(negedge clk);
    @(negedge clk);
    rf_full = 0;
    repeat (3) @(negedge clk);
    checks++; if (n_return != 1) fail("reply not returned");
    expect_batch("returned reply", H_INSERT, 2, 21);
    send(OP_PUBLISH, SIDE_ASK, 0, 0);
    expect_levels("after return", '{1, 2, 17, 20}, '{1, 1, 4, 1});

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
