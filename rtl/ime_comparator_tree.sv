// Comparator tree array and integer MV buffer of the IME engine.
//
// For each of the 41 VBS blocks, one eight-input comparator tree takes the
// costs (SAD plus MV cost) of the eight search points evaluated in the same
// cycle, finds the smallest in three levels of two-input comparators (on a
// tie the lower candidate index wins) and compares it with the best cost held
// for that block. A strictly smaller cost replaces the best cost and the best
// integer MV. 'clear' starts a new search: the held cost then counts as
// infinite in that same cycle.
//
// Timing: costs presented with 'valid' are folded into best_cost/best_mv at
// the next clock edge. The 41 trees and the per-block best-MV update follow
// the encoder; tie and clear rules are this design's.
module ime_comparator_tree
  import h264enc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  valid,
  input  sad_t  sad     [NUM_CAND][NUM_BLK],
  input  cost_t mv_cost [NUM_CAND],
  input  mv_t   cand_mv [NUM_CAND],
  output cost_t best_cost [NUM_BLK],
  output mv_t   best_mv   [NUM_BLK]
);

  typedef struct packed {
    cost_t      cost;
    logic [2:0] idx;
  } cand_t;

  function automatic cand_t pick(input cand_t a, input cand_t b);
    return (b.cost < a.cost) ? b : a;
  endfunction

  function automatic cost_t sat_add(input sad_t s, input cost_t c);
    logic [COST_W:0] t;
    t = (COST_W+1)'(s) + (COST_W+1)'(c);
    return t[COST_W] ? '1 : t[COST_W-1:0];
  endfunction

  for (genvar b = 0; b < NUM_BLK; b++) begin : g_blk
    cand_t l0 [NUM_CAND];
    cand_t l1 [4];
    cand_t l2 [2];
    cand_t win;
    cost_t held;

    for (genvar k = 0; k < NUM_CAND; k++) begin : g_in
      assign l0[k].cost = sat_add(sad[k][b], mv_cost[k]);
      assign l0[k].idx  = 3'(k);
    end
    for (genvar k = 0; k < 4; k++) begin : g_l1
      assign l1[k] = pick(l0[2*k], l0[2*k+1]);
    end
    assign l2[0] = pick(l1[0], l1[1]);
    assign l2[1] = pick(l1[2], l1[3]);
    assign win   = pick(l2[0], l2[1]);
    assign held  = clear ? '1 : best_cost[b];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        best_cost[b] <= '1;
        best_mv[b]   <= '0;
      end else if (valid && win.cost < held) begin
        best_cost[b] <= win.cost;
        best_mv[b]   <= cand_mv[win.idx];
      end else if (clear) begin
        best_cost[b] <= '1;
        best_mv[b]   <= '0;
      end
    end
  end

endmodule
