// l2_compare: cost and best-position unit of search level 2.  Level 2 works
// on the 16:1 subsampled macroblock (4x4 samples), so it only has the 16x16
// partition and needs no SAD tree.  For NPOS positions per cycle the SAD is
// scaled by the subsampling ratio (x16), lambda*R against the INTER
// predictor is added, a comparator tree picks the cheapest position of the
// cycle and a running minimum keeps the best of the search.
//
// Interface and timing as l1_tree; the result is the level's single 16x16
// candidate.  The x16 scaling is this design's choice so that costs of the
// three levels can be compared.
module l2_compare
  import me_pkg::*;
#(
  parameter int unsigned NPOS  = 32,
  parameter int unsigned SHIFT = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic [7:0]                lambda,
  input  mv_t                       mvp,
  input  logic                      in_valid,
  input  mv_t  [NPOS-1:0]           pos_mv,
  input  logic [NPOS-1:0][SAD4_W-1:0] sad,
  output mode_t                     res
);

  cost_t best_c, gc;
  mv_t   best_mv, gm;

  always_comb begin
    gc = COST_MAX;
    gm = pos_mv[0];
    for (int n = 0; n < int'(NPOS); n++) begin
      cost_t s;
      s = sat_add(cost_t'(sad[n]) << SHIFT, mv_cost(lambda, pos_mv[n], mvp));
      if (s < gc) begin gc = s; gm = pos_mv[n]; end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_c  <= COST_MAX;
      best_mv <= '0;
    end else if (clear) begin
      best_c  <= COST_MAX;
      best_mv <= '0;
    end else if (in_valid && gc < best_c) begin
      best_c  <= gc;
      best_mv <= gm;
    end
  end

  always_comb begin
    res       = '0;
    res.valid = 1'b1;
    res.pred  = P_L2;
    res.part  = B16X16;
    res.cost  = best_c;
    for (int b = 0; b < 16; b++) begin
      res.mv[b]  = best_mv;
      res.mvp[b] = mvp;
    end
  end

endmodule
