// l1_tree: "8x8 SAD tree" of search level 1.  Level 1 works on the 4:1
// subsampled macroblock (8x8 samples), so each 4x4 primitive SAD stands for
// an 8x8 block of the full-resolution MB and only 16x16, 16x8, 8x16 and 8x8
// partitions exist.  For NPOS positions per cycle it forms the nine block
// SADs, scales them by the subsampling ratio (x4, so level-1 costs compare
// with level-0 costs), adds lambda*R against the INTER predictor and keeps
// the best cost and MV of every block.  The result is this level's single
// candidate: the cheapest of the four partitionings (8x8 is reported as
// submode with all sub-partitions 8x8).
//
// Interface and timing as l0_tree: clear, then in_valid per position group;
// the result is valid from the cycle after the last in_valid.  The x4
// scaling and the choice of the level's single candidate are this design's
// reading of the architecture.
module l1_tree
  import me_pkg::*;
#(
  parameter int unsigned NPOS  = 8,
  parameter int unsigned SHIFT = 2
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic [7:0]                   lambda,
  input  mv_t                          mvp,
  input  logic                         in_valid,
  input  mv_t  [NPOS-1:0]              pos_mv,
  input  logic [NPOS-1:0][3:0][SAD4_W-1:0] sad4,   // 2x2 raster of 8x8 blocks
  output mode_t                        res
);

  localparam int NBK = 9;
  // membership of the four 8x8 quadrants in each block
  function automatic logic [3:0] bmask(input int i);
    case (i)
      0: return 4'b1111;
      1: return 4'b0011;   // upper 16x8
      2: return 4'b1100;
      3: return 4'b0101;   // left 8x16
      4: return 4'b1010;
      default: return 4'b0001 << (i - 5);
    endcase
  endfunction

  cost_t [NBK-1:0] best_c;
  mv_t   [NBK-1:0] best_mv;
  cost_t [NBK-1:0] gc;      // best of this cycle's group
  mv_t   [NBK-1:0] gm;

  always_comb begin
    for (int i = 0; i < NBK; i++) begin
      gc[i] = COST_MAX;
      gm[i] = pos_mv[0];
      for (int n = 0; n < int'(NPOS); n++) begin
        cost_t s;
        s = '0;
        for (int k = 0; k < 4; k++) if (bmask(i)[k]) s = s + (cost_t'(sad4[n][k]) << SHIFT);
        s = sat_add(s, mv_cost(lambda, pos_mv[n], mvp));
        if (s < gc[i]) begin gc[i] = s; gm[i] = pos_mv[n]; end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_c  <= {NBK{COST_MAX}};
      best_mv <= '0;
    end else if (clear) begin
      best_c  <= {NBK{COST_MAX}};
      best_mv <= '0;
    end else if (in_valid) begin
      for (int i = 0; i < NBK; i++)
        if (gc[i] < best_c[i]) begin
          best_c[i]  <= gc[i];
          best_mv[i] <= gm[i];
        end
    end
  end

  always_comb begin
    cost_t c16, c168, c816, c88;
    c16  = best_c[0];
    c168 = sat_add(best_c[1], best_c[2]);
    c816 = sat_add(best_c[3], best_c[4]);
    c88  = sat_add(sat_add(best_c[5], best_c[6]), sat_add(best_c[7], best_c[8]));
    res       = '0;
    res.valid = 1'b1;
    res.pred  = P_L1;
    for (int b = 0; b < 16; b++) res.mvp[b] = mvp;
    res.part = B16X16; res.cost = c16;
    for (int b = 0; b < 16; b++) res.mv[b] = best_mv[0];
    if (c168 < res.cost) begin
      res.part = B16X8; res.cost = c168;
      for (int b = 0; b < 16; b++) res.mv[b] = best_mv[1 + b / 8];
    end
    if (c816 < res.cost) begin
      res.part = B8X16; res.cost = c816;
      for (int b = 0; b < 16; b++) res.mv[b] = best_mv[3 + (b % 4) / 2];
    end
    if (c88 < res.cost) begin
      res.part = BSUB; res.cost = c88;
      for (int b = 0; b < 16; b++) res.mv[b] = best_mv[5 + (b / 8) * 2 + (b % 4) / 2];
    end
  end

endmodule
