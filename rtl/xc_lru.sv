// xc_lru: least-recently-used replacement state for the meta-tag sets.
//
// X-Cache replaces meta-tag entries in LRU order, and keeps the replacement
// policy in a block of its own so that a DSA-specific policy can take its
// place. Each set keeps a rank per way (0 = most recent, WAYS-1 = least
// recent); the ranks of a set always form a permutation. A touch of way t
// moves it to rank 0 and ages every way that was more recent than t by one.
// One touch per cycle, applied at the clock edge; the ranks of one set are
// read combinationally for victim selection. After reset way w has rank w:
// the rank array itself is not reset, a per-set bit records whether the set
// has been touched since reset and untouched sets read as the identity.
// LRU as the default policy follows the design; the rank encoding is this
// design's choice.
module xc_lru
  import xcache_pkg::*;
#(
  parameter int unsigned SETS = 512,
  parameter int unsigned WAYS = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        touch_en,
  input  logic [SET_W-1:0]            touch_set,
  input  logic [WAY_W-1:0]            touch_way,
  input  logic [SET_W-1:0]            rd_set,
  output logic [WAYS-1:0][WAY_W-1:0]  rd_rank
);
  localparam int unsigned SW = $clog2(SETS);

  logic [WAYS-1:0][WAY_W-1:0] rank_q [SETS];
  logic [SETS-1:0]            init_q;
  logic [WAYS-1:0][WAY_W-1:0] ident, cur, nxt;

  always_comb
    for (int w = 0; w < WAYS; w++) ident[w] = WAY_W'(w);

  assign rd_rank = init_q[rd_set[SW-1:0]]    ? rank_q[rd_set[SW-1:0]]    : ident;
  assign cur     = init_q[touch_set[SW-1:0]] ? rank_q[touch_set[SW-1:0]] : ident;

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      if (WAY_W'(w) == touch_way)          nxt[w] = '0;
      else if (cur[w] < cur[touch_way])    nxt[w] = cur[w] + 1'b1;
      else                                 nxt[w] = cur[w];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        init_q <= '0;
    else if (touch_en) init_q[touch_set[SW-1:0]] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (touch_en) rank_q[touch_set[SW-1:0]] <= nxt;
  end
endmodule
