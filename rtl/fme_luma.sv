// fme_luma: single-pass fractional motion estimation (SPFME) of the luma
// path for the up to three candidate modes handed over by IME.
//
// For every partition of a mode, ten quarter-pel positions around its
// integer vector are evaluated in one pass:
//   * the zero position and its four diagonal neighbours (+-1/4, +-1/4),
//   * the "MVP position" pred_frac = (mvp - mv) mod 4, taken in -2..+1
//     quarter pel, and its four neighbours up, down, left and right.
// The 4x4 blocks of the mode are sent in raster order, one every 4 cycles,
// through frac_block_pipe with ten PUs (one per position).  The SATDs of
// all 4x4 blocks of a partition are accumulated per position, lambda*R of
// the refined vector against the mode's predictor is added once per
// partition (the predictor is MVP_ILM for ILM/ILMR modes and MVP_INTER
// otherwise, as carried in the mode descriptor), and the cheapest position
// wins (Compare).  ILR-type modes (ILR, ILMR) subtract the up-sampled
// base-layer residual in the PUs, others use zero.
//
// Control: modes flagged skip (IBL, IBLR) are not processed; their IME cost
// is already final.  Level-0 modes read the level-0 SRAM (port 0); level-1
// and level-2 modes read the separately loaded mode-2 SRAM (port 1), whose
// window is centred on m2_center.  After all modes the SB buffer compares
// the FME costs with the costs of the skipped modes and outputs the best
// mode with its refined vectors.
//
// Timing: start samples all inputs; about 75 cycles per processed mode;
// done pulses with the final result.  nproc reports how many modes went
// through FME (0..3).
//
// The ten-point pattern, per-mode flags, residual multiplexer, MVP_ILM-based
// rate for ILM modes and the 1-3 mode control follow the architecture.
// Block order, pipeline cadence and tie rules are this design's choices.
module fme_luma
  import me_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  mode_t [2:0]              modes,
  input  logic  [2:0]              skip,
  input  mv_t                      mvp_inter,    // centre of the level-0 SRAM
  input  mv_t                      m2_center,    // centre of the mode-2 SRAM
  input  logic [7:0]               lambda,
  input  pix_t [15:0][15:0]        cur,
  input  res_t [15:0][15:0] upbr,
  output logic                     rd0_en,
  output logic                     rd1_en,
  output logic [5:0]               rd_row,
  input  pix_t [3:0][36:0]         rd0_data,
  input  pix_t [3:0][36:0]         rd1_data,
  output logic                     busy,
  output logic                     done,
  output mode_t                    best,
  output cost_t [2:0]              fme_cost,
  output logic [1:0]               nproc
);

  localparam int NC = 10;

  typedef enum logic [2:0] {S_IDLE, S_NEXT, S_ISSUE, S_WAIT, S_FIN, S_SB} state_e;
  state_e st;

  mode_t [2:0] md;
  logic  [2:0] sk;
  mv_t         cen0, cen2;
  logic [7:0]  lam;
  logic [1:0]  k;           // mode being processed
  logic [4:0]  nblk, ncnt;
  logic [1:0]  ph;
  mode_t [2:0] refined;
  logic  [2:0] done_m;      // mode went through FME

  logic [15:0][NC-1:0][COST_W-1:0] acc;
  logic [15:0] seen;

  function automatic logic signed [2:0] pfrac(input logic signed [MV_W-1:0] mvp, input logic signed [MV_W-1:0] mv);
    logic [1:0] f;
    f = 2'(mvp - mv + 2);
    return $signed({1'b0, f}) - 3'sd2;
  endfunction

  // candidate offsets of block b in mode m
  function automatic void cand_off(input mode_t m, input int b,
                                   output qoff_t [NC-1:0] ox,
                                   output qoff_t [NC-1:0] oy);
    logic signed [2:0] px, py;
    px = pfrac(m.mvp[b].x, m.mv[b].x);
    py = pfrac(m.mvp[b].y, m.mv[b].y);
    ox[0] = 0;  oy[0] = 0;
    ox[1] = -1; oy[1] = -1;
    ox[2] = 1;  oy[2] = -1;
    ox[3] = -1; oy[3] = 1;
    ox[4] = 1;  oy[4] = 1;
    ox[5] = px;     oy[5] = py;
    ox[6] = px;     oy[6] = py - 1;
    ox[7] = px;     oy[7] = py + 1;
    ox[8] = px - 1; oy[8] = py;
    ox[9] = px + 1; oy[9] = py;
  endfunction

  logic use_m2, use_res;
  assign use_m2  = (md[k].pred == P_L1) || (md[k].pred == P_L2);
  assign use_res = (md[k].pred == P_ILR) || (md[k].pred == P_ILMR);

  // request for block nblk of mode k
  logic req;
  logic [5:0] rq_row, rq_col;
  qoff_t [NC-1:0] rq_ox, rq_oy;
  pix_t [3:0][3:0] rq_cur;
  res_t [3:0][3:0] rq_res;
  always_comb begin
    int bx, by;
    mv_t m, c;
    bx = int'(nblk[1:0]); by = int'(nblk[3:2]);
    m  = md[k].mv[nblk[3:0]];
    c  = use_m2 ? cen2 : cen0;
    rq_row = 6'(by * 4 + int'(m.y >>> 2) - int'(c.y >>> 2) + 8);
    rq_col = 6'(bx * 4 + int'(m.x >>> 2) - int'(c.x >>> 2) + 8);
    cand_off(md[k], int'(nblk[3:0]), rq_ox, rq_oy);
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        rq_cur[y][x] = cur[by*4+y][bx*4+x];
        rq_res[y][x] = upbr[by*4+y][bx*4+x];
      end
  end
  assign req = (st == S_ISSUE) && (ph == 2'd0);

  logic rd_en;
  logic ov;
  logic [7:0] otag;
  logic [NC-1:0][15:0] osatd;

  frac_block_pipe #(.NC(NC)) u_pipe (
    .clk, .rst_n, .req, .req_row(rq_row), .req_col(rq_col), .req_offx(rq_ox), .req_offy(rq_oy),
    .req_use_res({NC{use_res}}), .req_cur(rq_cur), .req_res(rq_res), .req_tag({3'd0, nblk}),
    .rd_en, .rd_row, .rd_data(use_m2 ? rd1_data : rd0_data),
    .out_valid(ov), .out_tag(otag), .out_satd(osatd)
  );
  assign rd0_en = rd_en && !use_m2;
  assign rd1_en = rd_en &&  use_m2;

  // accumulate a returned block into its partition
  logic [3:0] opid;
  qoff_t [NC-1:0] o_ox, o_oy;
  assign opid = blk_pid(md[k].part, md[k].sub, otag[3:0]);
  always_comb cand_off(md[k], int'(otag[3:0]), o_ox, o_oy);

  // Compare: best position per partition and the mode cost
  cost_t             mode_cost;
  logic [15:0][3:0]  best_c;
  always_comb begin
    mode_cost = '0;
    for (int p = 0; p < 16; p++) begin
      cost_t bc;
      bc = COST_MAX;
      best_c[p] = '0;
      for (int c = 0; c < NC; c++)
        if (acc[p][c] < bc) begin bc = acc[p][c]; best_c[p] = 4'(c); end
      if (seen[p]) mode_cost = sat_add(mode_cost, bc);
    end
  end

  // SB buffer: final decision among processed and skipped modes
  mode_t sb_best;
  always_comb begin
    sb_best = '0;
    sb_best.cost = COST_MAX;
    for (int m = 0; m < 3; m++)
      if ((done_m[m] || (sk[m] && md[m].valid)) && refined[m].cost < sb_best.cost)
        sb_best = refined[m];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; k <= '0; nblk <= '0; ncnt <= '0; ph <= '0;
      md <= '0; sk <= '0; cen0 <= '0; cen2 <= '0; lam <= '0;
      acc <= '0; seen <= '0; refined <= '0; done_m <= '0;
      done <= 1'b0; best <= '0; fme_cost <= '0; nproc <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          md <= modes; sk <= skip; cen0 <= mvp_inter; cen2 <= m2_center; lam <= lambda;
          refined <= modes; done_m <= '0; k <= '0; nproc <= '0;
          fme_cost <= {3{COST_MAX}};
          st <= S_NEXT;
        end
        S_NEXT: begin
          if (md[k].valid && !sk[k]) begin
            nblk <= '0; ncnt <= '0; ph <= '0; seen <= '0;
            acc <= '0;
            st <= S_ISSUE;
          end else if (k == 2'd2) st <= S_SB;
          else k <= k + 1'b1;
        end
        S_ISSUE: begin
          ph <= ph + 1'b1;
          if (req) begin
            nblk <= nblk + 1'b1;
            if (nblk == 5'd15) st <= S_WAIT;
          end
        end
        S_WAIT: if (ncnt == 5'd16) st <= S_FIN;
        S_FIN: begin
          refined[k].cost <= mode_cost;
          for (int b = 0; b < 16; b++) begin
            qoff_t [NC-1:0] ox, oy;
            logic [3:0] p;
            p = blk_pid(md[k].part, md[k].sub, 4'(b));
            cand_off(md[k], b, ox, oy);
            refined[k].mv[b].x <= md[k].mv[b].x + MV_W'(ox[best_c[p]]);
            refined[k].mv[b].y <= md[k].mv[b].y + MV_W'(oy[best_c[p]]);
          end
          fme_cost[k] <= mode_cost;
          done_m[k]   <= 1'b1;
          nproc       <= nproc + 1'b1;
          if (k == 2'd2) st <= S_SB;
          else begin k <= k + 1'b1; st <= S_NEXT; end
        end
        S_SB: begin
          best <= sb_best;
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
      if (ov) begin
        ncnt <= ncnt + 1'b1;
        seen[opid] <= 1'b1;
        for (int c = 0; c < NC; c++) begin
          cost_t add;
          add = cost_t'(osatd[c]);
          if (!seen[opid]) begin
            mv_t cm;
            cm.x = md[k].mv[otag[3:0]].x + MV_W'(o_ox[c]);
            cm.y = md[k].mv[otag[3:0]].y + MV_W'(o_oy[c]);
            add = sat_add(add, mv_cost(lam, cm, md[k].mvp[otag[3:0]]));
          end
          acc[opid][c] <= sat_add(acc[opid][c], add);
        end
      end
    end
  end

  assign busy = (st != S_IDLE);

endmodule
