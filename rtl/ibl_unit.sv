// ibl_unit: cost of the inter-BL (IBL) and inter-BL-residual (IBLR) modes.
// These modes take the up-sampled base-layer motion vectors (mvd_ibl, one
// per 4x4 block, quarter pel) as final vectors, so no search is made: the
// reference is interpolated at exactly those vectors and the SATD of all
// sixteen 4x4 blocks is summed, once without and once with the up-sampled
// base-layer residual subtracted (IBL and IBLR share the interpolated
// data).  The SATD buffer is the pair of accumulators.
//
// Local-data condition: the reference is taken from the level-0 SRAM only.
// If the integer part of any mvd_ibl lies outside [-8,7] around the
// integer INTER predictor, the mode is skipped: both costs are set to
// COST_MAX and the results are marked not valid.
//
// Timing: start (one cycle) samples the inputs; blocks are issued to the
// fractional block pipeline every 4 cycles in raster order; done pulses
// about 70 cycles later (2 cycles when skipped).  Reads use the SRAM's
// four-row port.
//
// The interpolation / PU / SATD-buffer structure and the skip rule follow
// the architecture.  The architecture runs four interpolation units on four
// blocks of a row at once; here one pipeline serves the blocks in turn,
// which is this design's simplification.  The cost carries no rate term,
// since the vectors are inferred from the base layer (this design's choice).
module ibl_unit
  import me_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  mv_t                      mvp_inter,
  input  mv_t  [15:0]              mvd_ibl,
  input  pix_t [15:0][15:0]        cur,
  input  res_t [15:0][15:0] upbr,
  output logic                     rd_en,
  output logic [5:0]               rd_row,
  input  pix_t [3:0][36:0]         rd_data,
  output logic                     busy,
  output logic                     done,
  output logic                     in_range,
  output mode_t                    ibl,
  output mode_t                    iblr
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_DONE} state_e;
  state_e st;

  logic [4:0]  nblk, ncnt;      // blocks issued / results received
  logic [1:0]  ph;
  cost_t       acc0, acc1;
  mv_t         mvp_q;
  mv_t [15:0]  mv_q;

  logic inr;
  always_comb begin
    inr = 1'b1;
    for (int b = 0; b < 16; b++) inr &= in_window(mvd_ibl[b], mvp_inter);
  end

  // request of block nblk
  logic        req;
  logic [5:0]  rq_row, rq_col;
  qoff_t [1:0] rq_ox, rq_oy;
  pix_t [3:0][3:0]        rq_cur;
  res_t [3:0][3:0] rq_res;
  always_comb begin
    int bx, by;
    mv_t m;
    bx = int'(nblk[1:0]); by = int'(nblk[3:2]);
    m  = mv_q[nblk[3:0]];
    rq_row = 6'(by * 4 + int'(m.y >>> 2) - int'(mvp_q.y >>> 2) + 8);
    rq_col = 6'(bx * 4 + int'(m.x >>> 2) - int'(mvp_q.x >>> 2) + 8);
    for (int n = 0; n < 2; n++) begin
      rq_ox[n] = {1'b0, m.x[1:0]};
      rq_oy[n] = {1'b0, m.y[1:0]};
    end
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        rq_cur[y][x] = cur[by*4+y][bx*4+x];
        rq_res[y][x] = upbr[by*4+y][bx*4+x];
      end
  end
  assign req = (st == S_ISSUE) && (ph == 2'd0);

  logic              ov;
  logic [7:0]        otag;
  logic [1:0][15:0]  osatd;

  frac_block_pipe #(.NC(2)) u_pipe (
    .clk, .rst_n, .req, .req_row(rq_row), .req_col(rq_col), .req_offx(rq_ox), .req_offy(rq_oy),
    .req_use_res(2'b10), .req_cur(rq_cur), .req_res(rq_res), .req_tag({3'd0, nblk}),
    .rd_en, .rd_row, .rd_data, .out_valid(ov), .out_tag(otag), .out_satd(osatd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; nblk <= '0; ncnt <= '0; ph <= '0;
      acc0 <= '0; acc1 <= '0; in_range <= 1'b0; done <= 1'b0;
      mvp_q <= '0; mv_q <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          mvp_q <= mvp_inter; mv_q <= mvd_ibl;
          in_range <= inr;
          acc0 <= '0; acc1 <= '0; nblk <= '0; ncnt <= '0; ph <= '0;
          st <= inr ? S_ISSUE : S_DONE;
        end
        S_ISSUE: begin
          ph <= ph + 1'b1;
          if (req) begin
            nblk <= nblk + 1'b1;
            if (nblk == 5'd15) st <= S_WAIT;
          end
        end
        S_WAIT: if (ncnt == 5'd16) st <= S_DONE;
        S_DONE: begin done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
      if (ov) begin
        acc0 <= sat_add(acc0, cost_t'(osatd[0]));
        acc1 <= sat_add(acc1, cost_t'(osatd[1]));
        ncnt <= ncnt + 1'b1;
      end
    end
  end

  assign busy = (st != S_IDLE);

  always_comb begin
    ibl = '0;
    ibl.valid = in_range;
    ibl.pred  = P_IBL;
    ibl.part  = BSUB;
    ibl.sub   = {4{2'd3}};
    ibl.mv    = mv_q;
    ibl.mvp   = mv_q;
    ibl.cost  = in_range ? acc0 : COST_MAX;
    iblr      = ibl;
    iblr.pred = P_IBLR;
    iblr.cost = in_range ? acc1 : COST_MAX;
  end

endmodule
