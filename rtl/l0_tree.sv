// l0_tree: "Level 0 tree module" for one prediction mode (INTER, ILR, ILM or
// ILMR).  It receives the sixteen 4x4 SADs of two search positions per cycle
// from the level-0 ME module and
//   * sums them into the SADs of all 41 H.264 blocks (16x16, 2 16x8, 2 8x16,
//     4 8x8, 8 8x4, 8 4x8, 16 4x4): the 4x4 SAD tree, duplicated for the two
//     positions,
//   * adds the MV cost lambda*R of each block, where R is measured against
//     the predictor of the block's top-left 4x4 (mvp[]; all equal for the
//     INTER-predicted modes, the up-sampled base-layer MVs for ILM/ILMR),
//   * compares the two positions with each other and with the best so far,
//     keeping the best cost and MV of every block.
// After the search the four mode results are formed combinationally from the
// kept values: 16x16, 16x8, 8x16 and "submode", in which every 8x8 takes the
// cheapest of its 8x8, 8x4, 4x8 and 4x4 splits.
//
// Interface: clear (one cycle) resets the best values; in_valid qualifies
// pos_mv/sad4; enable=0 disables the mode (all costs COST_MAX, results not
// valid), as used when ILM is not allowed.  Results are valid from the cycle
// after the last in_valid.  Ties keep the earlier position and, in submode,
// the larger partition.
//
// Block set, the two-position duplication and best-position tracking follow
// the architecture; the MV-cost rate model and tie rules are this design's.
module l0_tree
  import me_pkg::*;
#(
  parameter pred_e PRED = P_INTER
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       enable,
  input  logic [7:0]                 lambda,
  input  mv_t  [15:0]                mvp,
  input  logic                       in_valid,
  input  mv_t  [1:0]                 pos_mv,
  input  logic [1:0][15:0][SAD4_W-1:0] sad4,
  output mode_t [3:0]                res      // [part_e]
);

  localparam int NB41 = 41;

  function automatic logic [15:0] blk_mask(input int i);
    int q, qx, qy, h;
    if (i == 0) return 16'hFFFF;
    if (i <= 2) return 16'h00FF << (8 * (i - 1));
    if (i <= 4) return 16'h3333 << (2 * (i - 3));
    if (i <= 8) begin
      q = i - 5; qx = q % 2; qy = q / 2;
      return 16'h0033 << (8 * qy + 2 * qx);
    end
    if (i <= 16) begin
      q = (i - 9) / 2; h = (i - 9) % 2; qx = q % 2; qy = q / 2;
      return 16'h0003 << (4 * (2 * qy + h) + 2 * qx);
    end
    if (i <= 24) begin
      q = (i - 17) / 2; h = (i - 17) % 2; qx = q % 2; qy = q / 2;
      return 16'h0011 << (8 * qy + 2 * qx + h);
    end
    return 16'h0001 << (i - 25);
  endfunction

  function automatic int blk_tl(input int i);
    logic [15:0] m;
    m = blk_mask(i);
    for (int b = 15; b >= 0; b--) if (m[b]) blk_tl = b;
  endfunction

  cost_t [NB41-1:0] best_c;
  mv_t   [NB41-1:0] best_mv;
  cost_t [1:0][NB41-1:0] cand;

  // one candidate cost per block and position; unrolled by generate so the
  // motion-vector cost function is elaborated once per block
  for (genvar gp = 0; gp < 2; gp++) begin : g_cand
    for (genvar gi = 0; gi < NB41; gi++) begin : g_blk
      localparam logic [15:0] M  = blk_mask(gi);
      localparam int          TL = blk_tl(gi);
      cost_t s;
      always_comb begin
        s = '0;
        for (int b = 0; b < 16; b++) if (M[b]) s = s + cost_t'(sad4[gp][b]);
      end
      assign cand[gp][gi] = sat_add(s, mv_cost(lambda, pos_mv[gp], mvp[TL]));
    end
  end

  // running minimum per block; position 0 wins ties with position 1
  for (genvar gi = 0; gi < NB41; gi++) begin : g_best
    cost_t c;
    mv_t   m;
    assign c = (cand[1][gi] < cand[0][gi]) ? cand[1][gi] : cand[0][gi];
    assign m = (cand[1][gi] < cand[0][gi]) ? pos_mv[1]   : pos_mv[0];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        best_c[gi]  <= COST_MAX;
        best_mv[gi] <= '0;
      end else if (clear) begin
        best_c[gi]  <= COST_MAX;
        best_mv[gi] <= '0;
      end else if (in_valid && enable && c < best_c[gi]) begin
        best_c[gi]  <= c;
        best_mv[gi] <= m;
      end
    end
  end

  // -------- mode results --------
  always_comb begin
    logic [3:0][1:0] sub;
    cost_t subcost;
    for (int pt = 0; pt < 4; pt++) begin
      res[pt]      = '0;
      res[pt].pred = PRED;
      res[pt].part = part_e'(pt);
      res[pt].valid = enable;
    end
    // 16x16
    res[0].cost = best_c[0];
    for (int b = 0; b < 16; b++) begin
      res[0].mv[b]  = best_mv[0];
      res[0].mvp[b] = mvp[0];
    end
    // 16x8 and 8x16
    res[1].cost = sat_add(best_c[1], best_c[2]);
    res[2].cost = sat_add(best_c[3], best_c[4]);
    for (int b = 0; b < 16; b++) begin
      res[1].mv[b]  = best_mv[1 + b / 8];
      res[1].mvp[b] = mvp[blk_tl(1 + b / 8)];
      res[2].mv[b]  = best_mv[3 + (b % 4) / 2];
      res[2].mvp[b] = mvp[blk_tl(3 + (b % 4) / 2)];
    end
    // submode
    subcost = '0;
    for (int q = 0; q < 4; q++) begin
      cost_t c88, c84, c48, c44, m;
      int qx, qy, tl;
      qx = q % 2; qy = q / 2;
      tl = 8 * qy + 2 * qx;
      c88 = best_c[5 + q];
      c84 = sat_add(best_c[9 + 2*q], best_c[10 + 2*q]);
      c48 = sat_add(best_c[17 + 2*q], best_c[18 + 2*q]);
      c44 = sat_add(sat_add(best_c[25 + tl], best_c[26 + tl]),
                    sat_add(best_c[29 + tl], best_c[30 + tl]));
      m = c88; sub[q] = 2'd0;
      if (c84 < m) begin m = c84; sub[q] = 2'd1; end
      if (c48 < m) begin m = c48; sub[q] = 2'd2; end
      if (c44 < m) begin m = c44; sub[q] = 2'd3; end
      subcost = sat_add(subcost, m);
    end
    res[3].cost = subcost;
    res[3].sub  = sub;
    for (int b = 0; b < 16; b++) begin
      int q, bx, by, i;
      bx = b % 4; by = b / 4;
      q  = (by / 2) * 2 + bx / 2;
      case (sub[q])
        2'd0:    i = 5 + q;
        2'd1:    i = 9 + 2*q + (by % 2);
        2'd2:    i = 17 + 2*q + (bx % 2);
        default: i = 25 + b;
      endcase
      res[3].mv[b]  = best_mv[i];
      res[3].mvp[b] = mvp[blk_tl(i)];
    end
    if (!enable)
      for (int pt = 0; pt < 4; pt++) res[pt].cost = COST_MAX;
  end

endmodule
