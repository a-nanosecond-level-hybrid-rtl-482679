// mdg_tb_harness: stimulus, host master-table model and reference model for
// end-to-end tests of mdg_hybrid_table_top. The wrapping testbench
// instantiates the design and this harness side by side and ties them with
// .* connections.
//
// Reference: a golden copy of every book side (price -> volume) updated in
// message order. Every result is compared with it: the levels shown must be
// the best levels of the golden side, select shows exactly one level.
// Host model: a sorted master table per side that applies forwarded and
// spilled items, answers a refill request with its smallest items after a
// programmable delay, and reports its new smallest key. The test ends by
// draining every book through select + delete of the best level, which
// checks that cache and master table together hold exactly the golden book
// and exercises refills until the host is empty.
//
// With REPLAY set, a rate-replay workload runs instead (see run_replay).
// With AUTO_PUB set, the periodic snapshot publisher of the design runs
// during the test. Its results (res_auto) are checked against the golden
// book when no order is in flight, otherwise for shape (no gaps, best level
// first, positive volumes); every book side must have been published.
// Workload phases: build-up (spills, forwarding), delete bursts with a slow
// host (refill, stall), regrowth while a refill is in flight (returned
// replies), a random mix, then the drain. Each mechanism is counted; one that
// never happened counts as a failure. Latency of every message that did not
// stall is checked: 2 cycles for select, publish and forwarded orders,
// 3 + sorter depth for cache insertions and deletions.
module mdg_tb_harness
  import mdg_pkg::*;
#(
  parameter int CACHE_SIZE   = 50,
  parameter int NUM_BOOKS    = 200,
  parameter int REFILL_LEVEL = 10,
  parameter int STALL_LEVEL  = 5,
  parameter int PUB_DEPTH    = 5,
  parameter int ACTIVE_BOOKS = 2,      // books that receive traffic
  parameter int N_BUILD      = 300,    // messages per build-up phase
  parameter int N_MIX        = 400,
  parameter int WATCHDOG     = 2_000_000,
  parameter bit REPLAY       = 1'b0,   // run the rate-replay workload instead
  parameter int REPLAY_LEN   = 750,
  parameter bit AUTO_PUB     = 1'b0,   // enable the periodic snapshot
  parameter int TBL_W        = clog2_min1(2 * NUM_BOOKS),
  parameter int BOOK_W       = clog2_min1(NUM_BOOKS)
) (
  output logic                   clk,
  output logic                   rst_n,
  input  logic                   init_done,
  output logic                   pub_enable,
  output logic                   msg_valid,
  input  logic                   msg_ready,
  output op_e                    msg_op,
  output logic [BOOK_W-1:0]      msg_book,
  output side_e                  msg_side,
  output key_t                   msg_price,
  output vol_t                   msg_vol,
  input  logic                   res_valid,
  input  logic                   res_auto,
  input  op_e                    res_op,
  input  logic [BOOK_W-1:0]      res_book,
  input  side_e                  res_side,
  input  logic                   res_to_master,
  input  logic                   res_found,
  input  entry_t [PUB_DEPTH-1:0] res_levels,
  input  logic                   tx_valid,
  output logic                   tx_ready,
  input  host_op_e               tx_op,
  input  logic [TBL_W-1:0]       tx_table,
  input  key_t                   tx_key,
  input  vol_t                   tx_vol,
  input  logic                   tx_last,
  output logic                   rx_valid,
  input  logic                   rx_ready,
  output logic [TBL_W-1:0]       rx_table,
  output logic                   rx_item,
  output key_t                   rx_key,
  output vol_t                   rx_vol,
  output logic                   rx_last,
  output key_t                   rx_ms,
  output logic                   rx_master_empty,
  input  logic                   ev_forward,
  input  logic                   ev_spill,
  input  logic                   ev_refill_req,
  input  logic                   ev_merge,
  input  logic                   ev_return,
  input  logic                   ev_stall
);

  localparam int NT     = 2 * NUM_BOOKS;
  localparam int LOGN   = clog2_min1(CACHE_SIZE);
  localparam int STAGES = LOGN * (LOGN + 1) / 2;
  localparam int HALF   = CACHE_SIZE / 2;
  localparam int B      = CACHE_SIZE - HALF;
  // active book i is book i * STRIDE, so traffic spreads over the range
  localparam int STRIDE = NUM_BOOKS / ACTIVE_BOOKS;

  int checks = 0, failures = 0;
  longint cycle = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- reference and master models ----------------
  // gold is indexed by active table (2 * active book + side), master by the
  // design's table index (2 * book + side).
  vol_t gold   [NT][key_t];
  vol_t master [NT][key_t];

  typedef struct {
    int   tbl;
    key_t keys[$];
    vol_t vols[$];
    key_t ms;
    logic empty;
    longint due;
  } reply_t;
  reply_t replies[$];
  int     host_delay = 4;          // cycles from request to reply

  // mechanism counters
  int n_forward = 0, n_spill = 0, n_req = 0, n_merge = 0, n_return = 0;
  int n_stall = 0, n_select = 0, n_publish = 0, n_found_ins = 0, n_invalidate = 0;
  int n_beats = 0;
  longint max_lat = 0;
  int n_spike = 0;                 // results slower than a sorted update

  always @(posedge clk) begin
    if (ev_forward)    n_forward++;
    if (ev_spill)      n_spill++;
    if (ev_refill_req) n_req++;
    if (ev_merge)      n_merge++;
    if (ev_return)     n_return++;
    if (ev_stall)      n_stall++;
  end

  // host side: consume FPGA->host beats
  always @(posedge clk) begin
    if (rst_n && tx_valid && tx_ready) begin
      n_beats++;
      unique case (tx_op)
        H_INSERT: begin
          if (master[tx_table].exists(tx_key)) master[tx_table][tx_key] += tx_vol;
          else                                 master[tx_table][tx_key]  = tx_vol;
        end
        H_DELETE: begin
          if (master[tx_table].exists(tx_key)) begin
            master[tx_table][tx_key] -= tx_vol;
            if (master[tx_table][tx_key] <= 0) master[tx_table].delete(tx_key);
          end
        end
        H_REFILL_REQ: begin
          reply_t r;
          key_t   k;
          r.keys.delete();
          r.vols.delete();
          r.tbl = int'(tx_table);
          for (int i = 0; i < int'(tx_vol); i++) begin
            if (!master[tx_table].first(k)) break;
            r.keys.push_back(k);
            r.vols.push_back(master[tx_table][k]);
            master[tx_table].delete(k);
          end
          r.empty = (master[tx_table].num() == 0);
          r.ms    = '0;
          if (!r.empty) void'(master[tx_table].first(r.ms));
          r.due   = cycle + host_delay;
          replies.push_back(r);
        end
        default: begin
          failures++;
          $display("ERROR: bad host op");
        end
      endcase
    end
  end

  // host side: send refill replies
  int beat = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      rx_valid <= 1'b0;
      beat     = 0;
    end else begin
      if (rx_valid && rx_ready) begin
        if (rx_last) begin
          void'(replies.pop_front());
          beat = 0;
        end else beat++;
      end
      if (replies.size() > 0 && replies[0].due <= cycle) begin
        int nk;
        nk = replies[0].keys.size();
        rx_valid        <= 1'b1;
        rx_table        <= TBL_W'(replies[0].tbl);
        rx_item         <= beat < nk;
        rx_key          <= (beat < nk) ? replies[0].keys[beat] : '0;
        rx_vol          <= (beat < nk) ? replies[0].vols[beat] : '0;
        rx_last         <= (nk == 0) || (beat == nk - 1);
        rx_ms           <= replies[0].ms;
        rx_master_empty <= replies[0].empty;
      end else begin
        rx_valid <= 1'b0;
      end
    end
  end

  // ---------------- expected results ----------------
  typedef struct {
    op_e    op;
    int     book;
    side_e  side;
    longint t_acc;
    entry_t lv[PUB_DEPTH];
    int     nlv;
  } exp_t;
  exp_t   expq[$];
  logic   stalled_since_acc = 1'b0;
  int     n_auto = 0, n_auto_exact = 0;
  int     auto_seen[NT];

  assign pub_enable = AUTO_PUB;

  // Snapshot result: the side's golden best levels when no order is in
  // flight (golden then matches the table), else only the shape.
  task automatic check_auto();
    int   at;
    int   nlv;
    key_t k2;
    entry_t lv[PUB_DEPTH];
    n_auto++;
    auto_seen[2 * int'(res_book) + int'(res_side)]++;
    checks++;
    if (res_op != OP_PUBLISH) begin
      failures++;
      $display("ERROR: snapshot result with op %0d", res_op);
    end
    at = -1;
    if (int'(res_book) % STRIDE == 0 && int'(res_book) / STRIDE < ACTIVE_BOOKS)
      at = 2 * (int'(res_book) / STRIDE) + int'(res_side);
    nlv = 0;
    for (int i = 0; i < PUB_DEPTH; i++) lv[i] = '0;
    if (at >= 0 && gold[at].first(k2)) begin
      do begin
        lv[nlv] = '{valid: 1'b1, key: price_of(res_side, k2), vol: gold[at][k2]};
        nlv++;
      end while (nlv < PUB_DEPTH && gold[at].next(k2));
    end
    for (int i = 0; i < PUB_DEPTH; i++) begin
      if (i > 0 && res_levels[i].valid && !res_levels[i-1].valid) begin
        failures++;
        $display("ERROR: gap in snapshot levels");
      end
      if (i > 0 && res_levels[i].valid &&
          to_key(res_side, res_levels[i].key) <= to_key(res_side, res_levels[i-1].key)) begin
        failures++;
        $display("ERROR: snapshot levels out of order book %0d side %0d", res_book, res_side);
      end
      if (res_levels[i].valid && res_levels[i].vol <= 0) begin
        failures++;
        $display("ERROR: snapshot level with volume %0d", res_levels[i].vol);
      end
    end
    if (expq.size() == 0 && !msg_valid) begin
      n_auto_exact++;
      for (int i = 0; i < PUB_DEPTH; i++) begin
        if (res_levels[i].valid && (i >= nlv || res_levels[i] != lv[i])) begin
          failures++;
          $display("ERROR: snapshot level %0d book %0d side %0d got %0d/%0d want %0d/%0d",
                   i, res_book, res_side, res_levels[i].key, res_levels[i].vol,
                   lv[i].key, lv[i].vol);
        end
      end
      if (!res_levels[0].valid && nlv > 0) begin
        failures++;
        $display("ERROR: empty snapshot of book %0d side %0d", res_book, res_side);
      end
    end
  endtask

  function automatic key_t price_of(side_e side, key_t k);
    return to_key(side, k);
  endfunction

  always @(posedge clk) begin
    if (ev_stall) stalled_since_acc <= 1'b1;
    if (rst_n && res_valid && res_auto) begin
      check_auto();
    end else if (rst_n && res_valid) begin
      exp_t e;
      longint lat, want;
      int     shown;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("ERROR: unexpected result");
      end else begin
        e = expq.pop_front();
        if (res_op != e.op || int'(res_book) != e.book || res_side != e.side) begin
          failures++;
          $display("ERROR: result for wrong message op=%0d book=%0d", res_op, res_book);
        end
        shown = 0;
        for (int i = 0; i < PUB_DEPTH; i++) if (res_levels[i].valid) shown++;
        if (e.op == OP_SELECT) begin
          n_select++;
          if (shown != (e.nlv > 0 ? 1 : 0) || (e.nlv > 0 && res_levels[0] != e.lv[0])) begin
            failures++;
            $display("ERROR: select book %0d side %0d got %0d/%0d want %0d/%0d", e.book, e.side,
                     res_levels[0].key, res_levels[0].vol, e.lv[0].key, e.lv[0].vol);
          end
        end else begin
          if (e.op == OP_PUBLISH) n_publish++;
          // a short cache (refill in flight) may show fewer levels, never wrong ones
          for (int i = 0; i < PUB_DEPTH; i++) begin
            if (res_levels[i].valid && (i >= e.nlv || res_levels[i] != e.lv[i])) begin
              failures++;
              $display("ERROR: level %0d book %0d side %0d got %0d/%0d want %0d/%0d (op %0d)",
                       i, e.book, e.side, res_levels[i].key, res_levels[i].vol,
                       e.lv[i].key, e.lv[i].vol, e.op);
            end
            if (i > 0 && res_levels[i].valid && !res_levels[i-1].valid) begin
              failures++;
              $display("ERROR: gap in levels");
            end
          end
          if (shown == 0 && e.nlv > 0) begin
            failures++;
            $display("ERROR: empty top of book book %0d side %0d", e.book, e.side);
          end
        end
        // latency
        lat  = cycle - e.t_acc;
        if (lat > max_lat) max_lat = lat;
        if (lat > 3 + STAGES) n_spike++;
        want = (e.op == OP_SELECT || e.op == OP_PUBLISH || res_to_master) ? 2 : 3 + STAGES;
        if (!stalled_since_acc && !ev_stall) begin
          checks++;
          if (lat != want) begin
            failures++;
            $display("ERROR: latency %0d want %0d (op %0d) fwd=%0d at %0d", lat, want, e.op, res_to_master, cycle);
          end
        end
      end
    end
  end

  // ---------------- message driver ----------------
  task automatic send(op_e op, int book, side_e side, key_t k, vol_t v);
    exp_t e;
    int   t;
    @(negedge clk);
    msg_valid = 1'b1;
    msg_op    = op;
    msg_book  = BOOK_W'(book * STRIDE);
    msg_side  = side;
    msg_price = price_of(side, k);
    msg_vol   = v;
    while (!msg_ready) @(negedge clk);
    // accepted at the coming edge: apply to the golden book
    t = 2 * book + int'(side);
    if (op == OP_INSERT) begin
      if (gold[t].exists(k)) begin gold[t][k] += v; n_found_ins++; end
      else gold[t][k] = v;
    end else if (op == OP_DELETE) begin
      if (gold[t].exists(k)) begin
        gold[t][k] -= v;
        if (gold[t][k] <= 0) begin gold[t].delete(k); n_invalidate++; end
      end
    end
    e.op = op; e.book = book * STRIDE; e.side = side; e.t_acc = cycle;
    // best levels of the golden side (stored-key order), as prices
    e.nlv = 0;
    for (int i = 0; i < PUB_DEPTH; i++) e.lv[i] = '0;
    begin
      key_t k2;
      if (gold[t].first(k2)) begin
        do begin
          e.lv[e.nlv] = '{valid: 1'b1, key: price_of(side, k2), vol: gold[t][k2]};
          e.nlv++;
        end while (e.nlv < PUB_DEPTH && gold[t].next(k2));
      end
    end
    expq.push_back(e);
    @(posedge clk);
    stalled_since_acc <= 1'b0;
    #1 msg_valid = 1'b0;
  endtask

  task automatic wait_results();
    int guard = 0;
    while ((expq.size() > 0 || replies.size() > 0 || tx_valid) && guard < 100000) begin
      @(posedge clk);
      guard++;
    end
    repeat (5) @(posedge clk);
  endtask

  function automatic key_t rand_key(int spread);
    return key_t'(10000 + $urandom_range(0, spread - 1));
  endfunction

  // best existing key of a side, or a random one
  function automatic key_t pick_key(int t, int spread);
    key_t k;
    if ($urandom_range(0, 3) != 0 && gold[t].first(k)) return k;
    return rand_key(spread);
  endfunction

  // delete the whole volume of the best level
  task automatic delete_best(int book, side_e side);
    key_t k;
    int   t = 2 * book + int'(side);
    if (gold[t].first(k)) send(OP_DELETE, book, side, k, gold[t][k]);
  endtask

  // ---------------- rate-replay workload ----------------
  // One order sequence on one ask side, shaped like a trading session: the
  // table grows until it spills, shrinks until it asks for a refill, and so
  // on, ending with a run of pure deletions. It is replayed on two books:
  // at a low message rate (idle gap between messages, host answers quickly)
  // and at a high rate (back to back, slow host). The low-rate run must never
  // stall; the high-rate run must stall at least once and show a latency
  // above that of a sorted update.
  typedef struct { op_e op; key_t k; vol_t v; } ord_t;
  ord_t seq[$];

  function automatic int ins_pct(int i);
    // insert share (percent) along the session
    if (i < 100)                       return 90;
    if (i < 250)                       return 30;
    if (i < 420)                       return 75;
    if (i < REPLAY_LEN - 80)           return 45;
    if (i < REPLAY_LEN - 30)           return 0;   // burst of deletions
    return 80;
  endfunction

  task automatic build_replay();
    vol_t book[key_t];
    key_t k;
    seq.delete();
    for (int i = 0; i < REPLAY_LEN; i++) begin
      ord_t o;
      if ($urandom_range(0, 99) < ins_pct(i) || book.num() == 0) begin
        o.op = OP_INSERT;
        o.k  = rand_key(8 * CACHE_SIZE);
        o.v  = vol_t'($urandom_range(1, 20));
        if (book.exists(o.k)) book[o.k] += o.v; else book[o.k] = o.v;
      end else begin
        void'(book.first(k));
        o.op = OP_DELETE;
        o.k  = k;
        o.v  = book[k];
        book.delete(k);
      end
      seq.push_back(o);
      if (i % 25 == 0) begin
        ord_t q;
        q.op = (i % 50 == 0) ? OP_PUBLISH : OP_SELECT;
        q.k = '0; q.v = '0;
        seq.push_back(q);
      end
    end
  endtask

  task automatic play(int book, int gap, int delay, output int stalls, output longint lat,
                      output int spikes);
    int s0 = n_stall;
    host_delay = delay;
    max_lat = 0;
    n_spike = 0;
    foreach (seq[i]) begin
      send(seq[i].op, book, SIDE_ASK, seq[i].k, seq[i].v);
      if (gap > 0) begin
        while (expq.size() > 0) @(posedge clk);
        repeat (gap) @(posedge clk);
      end
    end
    wait_results();
    stalls = n_stall - s0;
    lat    = max_lat;
    spikes = n_spike;
  endtask

  task automatic run_replay();
    int     st_lo, st_hi, sp_lo, sp_hi;
    longint l_lo, l_hi;
    build_replay();
    // low rate: 150 idle cycles between messages, host answers in 60
    play(0, 150, 60, st_lo, l_lo, sp_lo);
    // high rate: back to back, host answers in 600 cycles
    play(1, 0, 600, st_hi, l_hi, sp_hi);
    $display("replay low rate : %0d orders, stall retries=%0d, max latency=%0d, slow results=%0d",
             seq.size(), st_lo, l_lo, sp_lo);
    $display("replay high rate: %0d orders, stall retries=%0d, max latency=%0d, slow results=%0d",
             seq.size(), st_hi, l_hi, sp_hi);
    $display("mechanisms: spill=%0d refill_req=%0d merge=%0d forward=%0d",
             n_spill, n_req, n_merge, n_forward);
    checks += 5;
    if (st_lo != 0 || sp_lo != 0) begin
      failures++;
      $display("ERROR: low-rate replay stalled");
    end
    if (st_hi == 0 || sp_hi == 0) begin
      failures++;
      $display("ERROR: high-rate replay never stalled");
    end
    if (n_spill == 0 || n_req == 0 || n_merge == 0) begin
      failures++;
      $display("ERROR: replay missed spill or refill");
    end
    if (l_lo != 3 + STAGES) begin
      failures++;
      $display("ERROR: low-rate worst latency %0d, want %0d", l_lo, 3 + STAGES);
    end
    if (l_hi <= 3 + STAGES) begin
      failures++;
      $display("ERROR: no latency spike at high rate");
    end
  endtask

  initial begin
    msg_valid = 1'b0;
    msg_op    = OP_INSERT;
    msg_book  = '0;
    msg_side  = SIDE_BID;
    msg_price = '0;
    msg_vol   = '0;
    tx_ready  = 1'b1;
    rst_n     = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (init_done);

    if (REPLAY) begin
      run_replay();
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end

    // 1. build-up: many distinct prices, spills and forwarding
    for (int i = 0; i < N_BUILD; i++)
      send(OP_INSERT, $urandom_range(0, ACTIVE_BOOKS - 1), side_e'($urandom_range(0, 1)),
           rand_key(4 * CACHE_SIZE), vol_t'($urandom_range(1, 20)));
    wait_results();

    // 2. delete bursts with a slow host: refill requests and stalls
    host_delay = 40 * (STAGES + 3);
    for (int b = 0; b < ACTIVE_BOOKS; b++)
      for (int s = 0; s < 2; s++)
        for (int i = 0; i < CACHE_SIZE; i++) delete_best(b, side_e'(s));
    wait_results();

    // 3. regrowth while a refill is in flight: replies come back
    for (int b = 0; b < ACTIVE_BOOKS; b++) begin
      automatic int t = 2 * b;
      int n_req0;
      // refill the side so that its master table holds items again
      for (int i = 0; i < 3 * CACHE_SIZE; i++)
        send(OP_INSERT, b, SIDE_BID, rand_key(4 * CACHE_SIZE), vol_t'($urandom_range(1, 20)));
      wait_results();
      n_req0 = n_req;
      while (gold[t].num() > 0 && n_req == n_req0) begin
        delete_best(b, SIDE_BID);
        while (expq.size() > 0) @(posedge clk);
        @(posedge clk);
      end
      // new best prices below everything, enough to pass half a table
      for (int i = 0; i < CACHE_SIZE; i++)
        send(OP_INSERT, b, SIDE_BID, key_t'(5000 + 40 * b + i), vol_t'(3));
      wait_results();
    end

    // 4. random mix of all routines, fast host
    host_delay = 4;
    for (int i = 0; i < N_MIX; i++) begin
      automatic int    b = $urandom_range(0, ACTIVE_BOOKS - 1);
      automatic side_e s = side_e'($urandom_range(0, 1));
      automatic int    t = 2 * b + int'(s);
      automatic int    pick = $urandom_range(0, 5);
      case (pick)
        0, 1: send(OP_INSERT, b, s, rand_key(4 * CACHE_SIZE), vol_t'($urandom_range(1, 20)));
        2:    send(OP_DELETE, b, s, pick_key(t, 4 * CACHE_SIZE), vol_t'($urandom_range(1, 25)));
        3:    delete_best(b, s);
        4:    send(OP_SELECT, b, s, '0, '0);
        default: send(OP_PUBLISH, b, s, '0, '0);
      endcase
    end
    wait_results();

    // 5. drain every active book: select then delete the best level
    for (int b = 0; b < ACTIVE_BOOKS; b++)
      for (int s = 0; s < 2; s++) begin
        automatic int t = 2 * b + s;
        automatic int guard = 0;
        while (gold[t].num() > 0 && guard < 100000) begin
          send(OP_SELECT, b, side_e'(s), '0, '0);
          delete_best(b, side_e'(s));
          guard++;
        end
        wait_results();
        send(OP_PUBLISH, b, side_e'(s), '0, '0);   // must show nothing
        wait_results();
        checks++;
        if (master[2 * b * STRIDE + s].num() != 0) begin
          failures++;
          $display("ERROR: master table of book %0d keeps %0d items after drain", b * STRIDE,
                   master[2 * b * STRIDE + s].num());
        end
      end

    // every mechanism must have happened
    $display("mechanisms: forward=%0d spill=%0d refill_req=%0d merge=%0d return=%0d stall=%0d",
             n_forward, n_spill, n_req, n_merge, n_return, n_stall);
    $display("            select=%0d publish=%0d add_to_existing=%0d invalidate=%0d host_beats=%0d",
             n_select, n_publish, n_found_ins, n_invalidate, n_beats);
    begin
      int cnt[10];
      cnt = '{n_forward, n_spill, n_req, n_merge, n_return, n_stall,
              n_select, n_publish, n_found_ins, n_invalidate};
      for (int i = 0; i < 10; i++) begin
        checks++;
        if (cnt[i] == 0) begin
          failures++;
          $display("ERROR: mechanism %0d never happened", i);
        end
      end
    end
    if (AUTO_PUB) begin
      int missing = 0;
      for (int t = 0; t < NT; t++) if (auto_seen[t] == 0) missing++;
      $display("            snapshots=%0d (compared with golden: %0d)", n_auto, n_auto_exact);
      checks++;
      if (missing != 0 || n_auto_exact == 0) begin
        failures++;
        $display("ERROR: %0d book sides never published, %0d exact snapshots", missing, n_auto_exact);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
