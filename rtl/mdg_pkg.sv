// mdg_pkg: types and constants shared by the hybrid sorted table.
//
// An order-book side is kept as a sorted table of (key, value) items, where
// the key is the price and the value the resting volume at that price. The
// on-chip "cache table" always holds the head (best prices) of the book; the
// rest lives in a host-side "master table". Both are sorted ascending in key
// space. Bid sides are stored with an inverted price (~price) so that the
// best bid is also the smallest key and one ascending sorter serves both
// sides; that mapping is this design's choice.
//
// Key and volume widths are not given by the source and are set to 32 bits.
package mdg_pkg;

  localparam int KEY_W = 32;  // price field width
  localparam int VOL_W = 32;  // volume field width (signed, may go <= 0)

  typedef logic [KEY_W-1:0]        key_t;
  typedef logic signed [VOL_W-1:0] vol_t;

  // One cache-table slot. Invalid slots sort after every valid slot.
  typedef struct packed {
    logic valid;
    key_t key;
    vol_t vol;
  } entry_t;

  // Item moved over the host link (no valid flag; counts travel alongside).
  typedef struct packed {
    key_t key;
    vol_t vol;
  } item_t;

  // Order-message operations (Sec. IV routines).
  typedef enum logic [1:0] {
    OP_INSERT  = 2'd0,  // add volume at a price
    OP_DELETE  = 2'd1,  // remove volume at a price
    OP_SELECT  = 2'd2,  // return the best item
    OP_PUBLISH = 2'd3   // return the top levels for a market data feed
  } op_e;

  // Book sides.
  typedef enum logic {
    SIDE_BID = 1'b0,
    SIDE_ASK = 1'b1
  } side_e;

  // Transfer types from FPGA to host master table.
  typedef enum logic [1:0] {
    H_INSERT     = 2'd0,  // add items (forwarded order or spilled cache items)
    H_DELETE     = 2'd1,  // forwarded deletion
    H_REFILL_REQ = 2'd2   // ask for the smallest items of the master table
  } host_op_e;

  // Sort order: valid entries first, then ascending key.
  function automatic logic entry_gt(entry_t a, entry_t b);
    return {~a.valid, a.key} > {~b.valid, b.key};
  endfunction

  // Price <-> stored key mapping (bid keys inverted so best is smallest).
  function automatic key_t to_key(side_e side, key_t price);
    return (side == SIDE_BID) ? ~price : price;
  endfunction

  function automatic int clog2_min1(int n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
