// me_top: motion estimation for a three-layer scalable H.264 encoder
// (CIF + 480p + 1080p at 60 frames/s, 135 MHz).  That load, 9906
// macroblocks per frame time, leaves about 450 cycles per macroblock only
// if two frames are coded at once, so the design holds NCORE = 2 complete
// engines (me_core), each working on a macroblock of a different frame.
// Each engine has its own reference SRAMs, load ports and results; they
// share only the clock and reset.
//
// Per engine (index e): start[e] begins a macroblock with lambda, the INTER
// predictor, the 16 up-sampled base-layer predictors (which also serve as
// the IBL vectors), the current MB pixels and the up-sampled base-layer
// residual.  Reference windows are written through the l0_*/l1_*/l2_*
// ports beforehand, and through m2_* on request (m2_req, m2_center,
// answered by m2_ready).  done[e] pulses with best[e], the chosen mode with
// its quarter-pel vectors and RD cost; ime_modes/ime_skip are the (up to)
// three modes passed from integer to fractional search.
//
// The two-engine organisation follows the architecture's double-hardware
// policy; everything inside an engine is described in me_core.
module me_top
  import me_pkg::*;
#(
  parameter int unsigned NCORE = 2
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [NCORE-1:0]                   start,
  input  logic [NCORE-1:0][7:0]              lambda,
  input  mv_t  [NCORE-1:0]                   mvp_inter,
  input  mv_t  [NCORE-1:0][15:0]             mvp_ilm,
  input  pix_t [NCORE-1:0][15:0][15:0]       cur,
  input  res_t [NCORE-1:0][15:0][15:0]  upbr,
  input  logic [NCORE-1:0]                   l0_we,
  input  logic [NCORE-1:0][5:0]              l0_waddr,
  input  pix_t [NCORE-1:0][36:0]             l0_wdata,
  input  logic [NCORE-1:0]                   l1_we,
  input  logic [NCORE-1:0][7:0]              l1_waddr,
  input  logic [NCORE-1:0][7:0]              l1_wbank,
  input  pix_t [NCORE-1:0][7:0]              l1_wdata,
  input  logic [NCORE-1:0]                   l2_we,
  input  logic [NCORE-1:0][7:0]              l2_waddr,
  input  logic [NCORE-1:0][7:0]              l2_wbank,
  input  pix_t [NCORE-1:0][3:0]              l2_wdata,
  output logic [NCORE-1:0]                   m2_req,
  output mv_t  [NCORE-1:0]                   m2_center,
  input  logic [NCORE-1:0]                   m2_ready,
  input  logic [NCORE-1:0]                   m2_we,
  input  logic [NCORE-1:0][5:0]              m2_waddr,
  input  pix_t [NCORE-1:0][36:0]             m2_wdata,
  output logic [NCORE-1:0]                   busy,
  output logic [NCORE-1:0]                   done,
  output mode_t [NCORE-1:0]                  best,
  output mode_t [NCORE-1:0][2:0]             ime_modes,
  output logic  [NCORE-1:0][2:0]             ime_skip,
  output logic  [NCORE-1:0][15:0]            elim,
  output logic  [NCORE-1:0]                  ilm_ok,
  output logic  [NCORE-1:0]                  ibl_ok,
  output logic  [NCORE-1:0][1:0]             fme_nproc
);

  for (genvar e = 0; e < int'(NCORE); e++) begin : g_core
    me_core u_core (
      .clk, .rst_n, .start(start[e]), .lambda(lambda[e]), .mvp_inter(mvp_inter[e]),
      .mvp_ilm(mvp_ilm[e]), .cur(cur[e]), .upbr(upbr[e]),
      .l0_we(l0_we[e]), .l0_waddr(l0_waddr[e]), .l0_wdata(l0_wdata[e]),
      .l1_we(l1_we[e]), .l1_waddr(l1_waddr[e]), .l1_wbank(l1_wbank[e]), .l1_wdata(l1_wdata[e]),
      .l2_we(l2_we[e]), .l2_waddr(l2_waddr[e]), .l2_wbank(l2_wbank[e]), .l2_wdata(l2_wdata[e]),
      .m2_req(m2_req[e]), .m2_center(m2_center[e]), .m2_ready(m2_ready[e]),
      .m2_we(m2_we[e]), .m2_waddr(m2_waddr[e]), .m2_wdata(m2_wdata[e]),
      .busy(busy[e]), .done(done[e]), .best(best[e]), .ime_modes(ime_modes[e]),
      .ime_skip(ime_skip[e]), .elim(elim[e]), .ilm_ok(ilm_ok[e]), .ibl_ok(ibl_ok[e]),
      .fme_nproc(fme_nproc[e])
    );
  end

endmodule
