// bitonic_sorter: pipelined bitonic sorting network for one cache table.
//
// Sorts N entries ascending by (valid first, then key), so invalid slots
// collect at the end of the table, which is how the cache table drops
// deleted keys and makes room for new ones. The network works on the next
// power of two NP >= N; the extra lanes are fed constant invalid entries and
// fall away in synthesis. It has log2(NP)*(log2(NP)+1)/2 compare-exchange
// layers (21 for the default N = 50, NP = 64) and a register rank after
// every layer, so the latency is exactly STAGES clock cycles and a new table
// may enter every cycle.
//
// Interface: in_valid/in_data enter the network; out_valid/out_data leave it
// STAGES cycles later. No back-pressure.
//
// The bitonic network itself follows the source; one layer per clock and the
// padding of a non power-of-two table are this design's choices.
module bitonic_sorter
  import mdg_pkg::*;
#(
  parameter int N = 50
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  entry_t [N-1:0]       in_data,
  output logic                 out_valid,
  output entry_t [N-1:0]       out_data
);

  localparam int LOGN   = clog2_min1(N);
  localparam int NP     = 1 << LOGN;
  localparam int STAGES = LOGN * (LOGN + 1) / 2;

  // Block-size exponent p (1..LOGN) and distance exponent q of layer s.
  function automatic int layer_p(int s);
    int cnt = 0;
    for (int p = 1; p <= LOGN; p++)
      for (int q = p - 1; q >= 0; q--) begin
        if (cnt == s) return p;
        cnt++;
      end
    return 1;
  endfunction

  function automatic int layer_q(int s);
    int cnt = 0;
    for (int p = 1; p <= LOGN; p++)
      for (int q = p - 1; q >= 0; q--) begin
        if (cnt == s) return q;
        cnt++;
      end
    return 0;
  endfunction

  // lane[s] / vld[s]: input of layer s; each layer owns its output register
  wire entry_t [STAGES:0][NP-1:0] lane;
  wire [STAGES:0]               vld;
  entry_t [NP-1:0]      lane_in;

  always_comb begin
    lane_in = '0;
    for (int i = 0; i < N; i++) lane_in[i] = in_data[i];
  end
  assign lane[0] = lane_in;
  assign vld[0]  = in_valid;

  for (genvar s = 0; s < STAGES; s++) begin : g_layer
    localparam int P = layer_p(s);
    localparam int Q = layer_q(s);
    wire entry_t [NP-1:0] d = lane[s];
    wire entry_t [NP-1:0] nxt;

    // One comparator per lane pair (lo, lo + 2^Q); the pair sorts upward
    // when bit P of lo is 0, downward otherwise.
    for (genvar i = 0; i < NP; i++) begin : g_pair
      if ((i & (1 << Q)) == 0) begin : g_cmp
        localparam int  LO = i;
        localparam int  HI = i | (1 << Q);
        localparam bit  UP = ((LO >> P) & 1) == 0;
        logic swap;
        assign swap    = UP ? entry_gt(d[LO], d[HI])
                            : entry_gt(d[HI], d[LO]);
        assign nxt[LO] = swap ? d[HI] : d[LO];
        assign nxt[HI] = swap ? d[LO] : d[HI];
      end
    end

    entry_t [NP-1:0] q;
    logic            q_vld;

    always_ff @(posedge clk) q <= nxt;

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) q_vld <= 1'b0;
      else        q_vld <= vld[s];

    assign lane[s+1] = q;
    assign vld[s+1]  = q_vld;
  end

  assign out_valid = vld[STAGES];
  always_comb
    for (int i = 0; i < N; i++) out_data[i] = lane[STAGES][i];

endmodule
