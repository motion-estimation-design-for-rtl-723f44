// me_pkg: types, constants and small functions shared by the motion
// estimation blocks.
//
// Motion vectors are kept in quarter-pel units as two signed 14-bit fields,
// enough for a +-128 pel search around any predictor of a 1080p frame.
// RD costs are J = D + lambda * R (D = SAD in IME, SATD in FME).  The rate R
// of a motion vector difference is taken here as the length of the signed
// Exp-Golomb code H.264 uses for it, for each component; this choice of rate
// model is this design's own.
// Prediction modes follow the inter-layer scheme: INTER, ILR (inter-layer
// residual), ILM (inter-layer motion), ILMR, IBL (inter-BL), IBLR, plus the
// INTER winners of search levels 1 and 2.
package me_pkg;

  localparam int PIX_W  = 8;
  localparam int COST_W = 20;
  localparam int MV_W   = 14;
  localparam int SAD4_W = 13;   // 4x4 SAD incl. residual mode: 16 * 510 < 2^13

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic signed [8:0] res_t;    // up-sampled base-layer residual
  typedef logic signed [9:0] cres_t;   // current pixel minus residual
  typedef logic signed [2:0] qoff_t;   // quarter-pel candidate offset
  typedef logic [COST_W-1:0] cost_t;
  localparam cost_t COST_MAX = '1;

  typedef struct packed {
    logic signed [MV_W-1:0] x;
    logic signed [MV_W-1:0] y;
  } mv_t;

  // prediction type of a candidate mode
  typedef enum logic [2:0] {
    P_INTER = 3'd0, P_ILR = 3'd1, P_ILM = 3'd2, P_ILMR = 3'd3,
    P_IBL   = 3'd4, P_IBLR = 3'd5, P_L1 = 3'd6, P_L2 = 3'd7
  } pred_e;

  // macroblock partition
  typedef enum logic [1:0] {
    B16X16 = 2'd0, B16X8 = 2'd1, B8X16 = 2'd2, BSUB = 2'd3
  } part_e;

  // sub-macroblock partition of one 8x8: 0 8x8, 1 8x4, 2 4x8, 3 4x4
  typedef logic [1:0] sub_t;

  // One candidate mode handed from IME to FME.  mv and mvp are given for
  // every 4x4 block (raster order); all blocks of one partition carry the
  // same values.  Integer-pel searches give mv as a multiple of 4.
  typedef struct packed {
    logic                  valid;
    pred_e                 pred;
    part_e                 part;
    logic [3:0][1:0]       sub;
    mv_t [15:0]            mv;
    mv_t [15:0]            mvp;
    cost_t                 cost;
  } mode_t;

  // length in bits of the signed Exp-Golomb code of v
  function automatic int unsigned se_len(input logic signed [MV_W:0] v);
    logic [MV_W+1:0] code;
    int unsigned     n;
    code = (v > 0) ? (MV_W+2)'(2*v - 1) : (MV_W+2)'(-2*v);
    code = code + 1'b1;
    n = 0;
    for (int i = 0; i < MV_W+2; i++) if (code[i]) n = i;
    return 2*n + 1;
  endfunction

  // lambda * R for a motion vector against its predictor
  function automatic cost_t mv_cost(input logic [7:0] lambda, input mv_t mv, input mv_t mvp);
    int unsigned bits;
    bits = se_len((MV_W+1)'(mv.x) - (MV_W+1)'(mvp.x)) + se_len((MV_W+1)'(mv.y) - (MV_W+1)'(mvp.y));
    return cost_t'(lambda * bits);
  endfunction

  function automatic cost_t sat_add(input cost_t a, input cost_t b);
    logic [COST_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[COST_W] ? COST_MAX : s[COST_W-1:0];
  endfunction

  // partition index (0..15) of 4x4 block b (raster) for a partition layout
  function automatic logic [3:0] blk_pid(input part_e part, input logic [3:0][1:0] sub, input logic [3:0] b);
    logic [1:0] bx, by, q;
    bx = b[1:0]; by = b[3:2];
    q  = {by[1], bx[1]};
    case (part)
      B16X16: return 4'd0;
      B16X8:  return {3'd0, by[1]};
      B8X16:  return {3'd0, bx[1]};
      default: case (sub[q])
        2'd0:    return {q, 2'd0};
        2'd1:    return {q, 1'b0, by[0]};
        2'd2:    return {q, 1'b0, bx[0]};
        default: return {q, by[0], bx[0]};
      endcase
    endcase
  endfunction

  // Does the integer part of mv lie in the level-0 search range [-8,7]
  // around the integer part of the INTER predictor?  Used as the ILM / IBL
  // threshold test: then the data of mv are in the local level-0 SRAM.
  function automatic logic in_window(input mv_t mv, input mv_t mvp);
    logic signed [MV_W-1:0] dx, dy;
    dx = (mv.x >>> 2) - (mvp.x >>> 2);
    dy = (mv.y >>> 2) - (mvp.y >>> 2);
    return (dx >= -8) && (dx <= 7) && (dy >= -8) && (dy <= 7);
  endfunction

endpackage
