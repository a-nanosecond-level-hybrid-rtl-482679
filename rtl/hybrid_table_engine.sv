// hybrid_table_engine: the shared routine engine of the hybrid sorted table.
//
// Every order-book side has a cache table of CACHE_SIZE (key, volume) slots
// in table_mem, kept sorted so that its head is the top of the book, plus
// the state of its synchronisation with the host master table: M_s (the
// smallest key held by the master table), a "master empty" flag and a
// "refill pending" flag. One engine serves all sides, one message at a
// time:
//
//  * Filter. An insertion or deletion whose key is >= M_s belongs to the
//    master table and is forwarded to the host; any other goes to the cache
//    table. With an empty master table everything stays on chip.
//  * Insert / delete. table_update adds or subtracts the volume (a new key
//    takes the last slot, an emptied key is invalidated), then
//    bitonic_sorter restores order.
//  * Select / publish. The head of the sorted table is returned at once:
//    the best level, or the top PUB_DEPTH levels for a market data feed.
//  * Spill (FPGA to CPU). When an insertion fills the table, its upper half
//    is sent to the master table as one batch and M_s becomes the smallest
//    key sent. The engine does not wait for the host.
//  * Refill (CPU to FPGA). When fewer than REFILL_LEVEL items remain and the
//    master table is not empty, a request for CACHE_SIZE/2 items is queued
//    and processing goes on. When the reply arrives (refill_buffer) it is
//    written into the free upper half and sorted in; M_s and the empty flag
//    take the host's values. A reply that no longer fits (insertions have
//    brought the table back to half or more while it was in flight) or that
//    is stale (the table spilled to the host after asking, so the host now
//    holds smaller keys than the reply) goes back to the host unchanged.
//  * Stall. While a refill is pending, a deletion that finds the table at
//    STALL_LEVEL items or fewer waits for the reply, and so does any order
//    that would go to the master table (its key may be among the items in
//    flight). The message is held and retried; refill replies are served
//    first, so the stall ends as soon as the reply is merged.
//
// Timing (from the cycle msg_valid && msg_ready): select, publish and
// forwarded orders give res_valid 2 cycles later; cache insertions and
// deletions 3 + SORT_STAGES cycles later (24 for CACHE_SIZE = 50). A full
// table, an empty host FIFO slot or a stall adds cycles. After reset the
// engine spends NUM_TABLES cycles clearing table_mem (init_done low).
//
// Interfaces: msg_* valid/ready order input; res_* one-cycle result pulse
// (levels carry prices, best first, for the updated book); hb_* push of a
// batch into the host FIFO; rf_* the completed refill reply; ev_* one-cycle
// event pulses for monitoring.
//
// From the source: the filter on M_s, the two routines, the parallel search,
// the bitonic sort, spill of half the table when full, refill of half a
// table triggered below a threshold (10) with stall at 5 items, and the
// default sizes. This design's own choices: bid keys stored inverted, one
// message at a time, the stall rule for master-bound orders, returning
// replies that no longer fit or are stale, and the message and result
// formats.
module hybrid_table_engine
  import mdg_pkg::*;
#(
  parameter int CACHE_SIZE   = 50,
  parameter int NUM_BOOKS    = 200,
  parameter int REFILL_LEVEL = 10,
  parameter int STALL_LEVEL  = 5,
  parameter int PUB_DEPTH    = 5,
  // derived, do not override
  parameter int NUM_TABLES   = 2 * NUM_BOOKS,
  parameter int TBL_W        = clog2_min1(NUM_TABLES),
  parameter int BOOK_W       = clog2_min1(NUM_BOOKS),
  parameter int HALF         = CACHE_SIZE / 2,
  parameter int B            = CACHE_SIZE - HALF,
  parameter int NW           = $clog2(B + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  output logic                  init_done,
  // order messages
  input  logic                  msg_valid,
  output logic                  msg_ready,
  input  op_e                   msg_op,
  input  logic [BOOK_W-1:0]     msg_book,
  input  side_e                 msg_side,
  input  key_t                  msg_price,
  input  vol_t                  msg_vol,
  // results
  output logic                  res_valid,
  output op_e                   res_op,
  output logic [BOOK_W-1:0]     res_book,
  output side_e                 res_side,
  output logic                  res_to_master,
  output logic                  res_found,
  output entry_t [PUB_DEPTH-1:0] res_levels,
  // batches toward the host FIFO
  output logic                  hb_push,
  input  logic                  hb_full,
  output host_op_e              hb_op,
  output logic [TBL_W-1:0]      hb_tbl,
  output logic [NW-1:0]         hb_n,
  output item_t [B-1:0]         hb_items,
  // completed refill reply
  input  logic                  rf_full,
  input  logic [TBL_W-1:0]      rf_table,
  input  logic [NW-1:0]         rf_n,
  input  item_t [B-1:0]         rf_items,
  input  key_t                  rf_ms,
  input  logic                  rf_master_empty,
  output logic                  rf_consume,
  // event pulses
  output logic                  ev_forward,
  output logic                  ev_spill,
  output logic                  ev_refill_req,
  output logic                  ev_merge,
  output logic                  ev_return,
  output logic                  ev_stall
);

  localparam int CW = $clog2(CACHE_SIZE + 1);

  typedef struct packed {
    entry_t [CACHE_SIZE-1:0] e;
    key_t                    ms;
    logic                    master_empty;
    logic                    refill_pending;
    logic                    refill_stale;
  } tstate_t;

  localparam tstate_t EMPTY_TABLE = '{e: '0, ms: '0, master_empty: 1'b1,
                                      refill_pending: 1'b0, refill_stale: 1'b0};

  typedef enum logic [2:0] {S_INIT, S_IDLE, S_EXEC, S_SORT, S_POST} state_e;

  state_e               state;
  logic                 mode_merge;   // current job is a refill merge
  logic                 held;         // a message is captured in cur_*
  op_e                  cur_op;
  logic [BOOK_W-1:0]    cur_book;
  side_e                cur_side;
  key_t                 cur_key;
  vol_t                 cur_vol;
  logic [TBL_W-1:0]     cur_tbl;      // table of the current job
  logic                 cur_found;
  key_t                 cur_ms;
  logic                 cur_mempty;
  logic                 cur_pending;
  logic                 cur_stale;
  entry_t [CACHE_SIZE-1:0] sorted_q;
  logic [TBL_W-1:0]     init_idx;

  // memory
  logic             rd_en, wr_en;
  logic [TBL_W-1:0] rd_addr, wr_addr;
  tstate_t          rd_data, wr_data;

  table_mem #(.DEPTH(NUM_TABLES), .T(tstate_t)) u_mem (
    .clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data
  );

  // search / modify and sort
  entry_t [CACHE_SIZE-1:0] upd_tbl, sort_in, sort_out;
  logic                    upd_found, sort_in_valid, sort_out_valid;

  table_update #(.N(CACHE_SIZE)) u_update (
    .tbl_in(rd_data.e), .is_delete(cur_op == OP_DELETE), .key(cur_key),
    .vol(cur_vol), .tbl_out(upd_tbl), .found(upd_found)
  );

  bitonic_sorter #(.N(CACHE_SIZE)) u_sort (
    .clk, .rst_n, .in_valid(sort_in_valid), .in_data(sort_in),
    .out_valid(sort_out_valid), .out_data(sort_out)
  );

  function automatic logic [CW-1:0] count_valid(entry_t [CACHE_SIZE-1:0] t);
    logic [CW-1:0] c = '0;
    for (int i = 0; i < CACHE_SIZE; i++) c += CW'(t[i].valid);
    return c;
  endfunction

  function automatic key_t key_of(side_e side, key_t price);
    return to_key(side, price);
  endfunction

  // table index of a book side: two sides per book
  function automatic logic [TBL_W-1:0] tbl_of(logic [BOOK_W-1:0] book, side_e side);
    return TBL_W'({book, 1'b0}) | TBL_W'(side);
  endfunction

  // --- decisions on the table read in S_EXEC ---
  logic [CW-1:0] rd_count, post_count;
  logic          is_upd, to_master, stall, merge_fits;
  logic          post_spill, post_req, post_wait;

  assign rd_count   = count_valid(rd_data.e);
  assign is_upd     = (cur_op == OP_INSERT) || (cur_op == OP_DELETE);
  assign to_master  = is_upd && !rd_data.master_empty && (cur_key >= rd_data.ms);
  assign stall      = rd_data.refill_pending &&
                      (to_master || (cur_op == OP_DELETE && rd_count <= CW'(STALL_LEVEL)));
  assign merge_fits = rd_count < CW'(HALF) && !rd_data.refill_stale;

  assign post_count = count_valid(sorted_q);
  assign post_spill = post_count >= CW'(CACHE_SIZE);
  assign post_req   = !post_spill && post_count < CW'(REFILL_LEVEL) &&
                      !cur_pending && !cur_mempty;
  assign post_wait  = (post_spill || post_req) && hb_full;

  // top-of-book levels of a table, converted back to prices
  function automatic entry_t [PUB_DEPTH-1:0] levels_of(entry_t [CACHE_SIZE-1:0] t,
                                                       side_e side, logic only_best);
    entry_t [PUB_DEPTH-1:0] l = '0;
    for (int i = 0; i < PUB_DEPTH && i < CACHE_SIZE; i++)
      if (t[i].valid && (!only_best || i == 0))
        l[i] = '{valid: 1'b1, key: to_key(side, t[i].key), vol: t[i].vol};
    return l;
  endfunction

  // --- combinational control ---
  always_comb begin
    msg_ready     = 1'b0;
    rd_en         = 1'b0;
    rd_addr       = cur_tbl;
    wr_en         = 1'b0;
    wr_addr       = cur_tbl;
    wr_data       = EMPTY_TABLE;
    sort_in_valid = 1'b0;
    sort_in       = upd_tbl;
    hb_push       = 1'b0;
    hb_op         = H_INSERT;
    hb_tbl        = cur_tbl;
    hb_n          = '0;
    hb_items      = '0;
    rf_consume    = 1'b0;
    ev_forward    = 1'b0;
    ev_spill      = 1'b0;
    ev_refill_req = 1'b0;
    ev_merge      = 1'b0;
    ev_return     = 1'b0;
    ev_stall      = 1'b0;

    unique case (state)
      S_INIT: begin
        wr_en   = 1'b1;
        wr_addr = init_idx;
      end

      S_IDLE: begin
        if (rf_full) begin
          rd_en   = 1'b1;
          rd_addr = rf_table;
        end else if (held) begin
          rd_en   = 1'b1;
          rd_addr = tbl_of(cur_book, cur_side);
        end else begin
          msg_ready = 1'b1;
          rd_en     = msg_valid;
          rd_addr   = tbl_of(msg_book, msg_side);
        end
      end

      S_EXEC: begin
        if (mode_merge) begin
          rf_consume = !(!merge_fits && rf_n != '0 && hb_full);
          if (merge_fits) begin
            ev_merge      = 1'b1;
            sort_in_valid = 1'b1;
            sort_in       = rd_data.e;
            for (int i = 0; i < B; i++)
              if (NW'(i) < rf_n)
                sort_in[HALF+i] = '{valid: 1'b1, key: rf_items[i].key,
                                    vol: rf_items[i].vol};
          end else if (rf_consume) begin
            // table regrew while the reply was in flight: give it back
            ev_return = 1'b1;
            hb_push   = rf_n != '0;
            hb_op     = H_INSERT;
            hb_n      = rf_n;
            hb_items  = rf_items;
            wr_en     = 1'b1;
            wr_data   = rd_data;
            wr_data.refill_pending = 1'b0;
            wr_data.refill_stale   = 1'b0;
            wr_data.master_empty   = rd_data.master_empty && (rf_n == '0);
          end
        end else if (!is_upd) begin
          // select / publish: answered from the head, no write
        end else if (stall) begin
          ev_stall = 1'b1;
        end else if (to_master) begin
          if (!hb_full) begin
            ev_forward = 1'b1;
            hb_push    = 1'b1;
            hb_op      = (cur_op == OP_DELETE) ? H_DELETE : H_INSERT;
            hb_n       = NW'(1);
            hb_items[0] = '{key: cur_key, vol: cur_vol};
          end
        end else begin
          sort_in_valid = 1'b1;
          sort_in       = upd_tbl;
        end
      end

      S_POST: begin
        if (!post_wait) begin
          wr_en   = 1'b1;
          wr_data = '{e: sorted_q, ms: cur_ms, master_empty: cur_mempty,
                      refill_pending: cur_pending,
                      refill_stale: cur_stale || (cur_pending && post_spill)};
          if (post_spill) begin
            ev_spill = 1'b1;
            hb_push  = 1'b1;
            hb_op    = H_INSERT;
            hb_n     = NW'(CACHE_SIZE - HALF);
            for (int i = 0; i < B; i++) begin
              hb_items[i] = '{key: sorted_q[HALF+i].key, vol: sorted_q[HALF+i].vol};
              wr_data.e[HALF+i] = '0;
            end
            wr_data.ms           = sorted_q[HALF].key;
            wr_data.master_empty = 1'b0;
          end else if (post_req) begin
            ev_refill_req = 1'b1;
            hb_push       = 1'b1;
            hb_op         = H_REFILL_REQ;
            hb_n          = NW'(B);
            wr_data.refill_pending = 1'b1;
          end
        end
      end

      default: ;
    endcase
  end

  // --- sequential control ---
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_INIT;
      init_idx    <= '0;
      init_done   <= 1'b0;
      held        <= 1'b0;
      mode_merge  <= 1'b0;
      res_valid   <= 1'b0;
      cur_op      <= OP_INSERT;
      cur_book    <= '0;
      cur_side    <= SIDE_BID;
      cur_key     <= '0;
      cur_vol     <= '0;
      cur_tbl     <= '0;
      cur_found   <= 1'b0;
      cur_ms      <= '0;
      cur_mempty  <= 1'b1;
      cur_pending <= 1'b0;
      cur_stale   <= 1'b0;
    end else begin
      res_valid <= 1'b0;
      unique case (state)
        S_INIT: begin
          init_idx <= init_idx + 1'b1;
          if (init_idx == TBL_W'(NUM_TABLES - 1)) begin
            state     <= S_IDLE;
            init_done <= 1'b1;
          end
        end

        S_IDLE: begin
          if (rf_full) begin
            mode_merge <= 1'b1;
            state      <= S_EXEC;
            cur_tbl    <= rf_table;   // a held message keeps cur_book/cur_side
          end else if (held) begin
            mode_merge <= 1'b0;
            cur_tbl    <= tbl_of(cur_book, cur_side);
            state      <= S_EXEC;
          end else if (msg_valid) begin
            mode_merge <= 1'b0;
            held       <= 1'b1;
            cur_op     <= msg_op;
            cur_book   <= msg_book;
            cur_side   <= msg_side;
            cur_key    <= key_of(msg_side, msg_price);
            cur_vol    <= msg_vol;
            cur_tbl    <= tbl_of(msg_book, msg_side);
            state      <= S_EXEC;
          end
        end

        S_EXEC: begin
          cur_ms      <= rd_data.ms;
          cur_mempty  <= rd_data.master_empty;
          cur_pending <= rd_data.refill_pending;
          cur_stale   <= rd_data.refill_stale;
          cur_found   <= upd_found;
          if (mode_merge) begin
            if (merge_fits) begin
              cur_ms      <= rf_ms;
              cur_mempty  <= rf_master_empty;
              cur_pending <= 1'b0;
              cur_stale   <= 1'b0;
              state       <= S_SORT;
            end else if (rf_consume) begin
              state <= S_IDLE;
            end
          end else if (!is_upd) begin
            held          <= 1'b0;
            res_valid     <= 1'b1;
            res_to_master <= 1'b0;
            res_found     <= rd_data.e[0].valid;
            res_levels    <= levels_of(rd_data.e, cur_side, cur_op == OP_SELECT);
            state         <= S_IDLE;
          end else if (stall) begin
            state <= S_IDLE;
          end else if (to_master) begin
            if (!hb_full) begin
              held          <= 1'b0;
              res_valid     <= 1'b1;
              res_to_master <= 1'b1;
              res_found     <= 1'b0;
              res_levels    <= levels_of(rd_data.e, cur_side, 1'b0);
              state         <= S_IDLE;
            end
          end else begin
            state <= S_SORT;
          end
        end

        S_SORT: begin
          if (sort_out_valid) begin
            sorted_q <= sort_out;
            state    <= S_POST;
          end
        end

        S_POST: begin
          if (!post_wait) begin
            state <= S_IDLE;
            if (!mode_merge) begin
              held          <= 1'b0;
              res_valid     <= 1'b1;
              res_to_master <= 1'b0;
              res_found     <= cur_found;
              res_levels    <= levels_of(wr_data.e, cur_side, 1'b0);
            end
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_IDLE && !rf_full && !held && msg_valid) begin
      res_op   <= msg_op;
      res_book <= msg_book;
      res_side <= msg_side;
    end
  end

  a_one_job: assert property (@(posedge clk) disable iff (!rst_n)
    msg_valid && msg_ready |-> state == S_IDLE && !held);
  a_push_ok: assert property (@(posedge clk) disable iff (!rst_n)
    hb_push |-> !hb_full);

endmodule
