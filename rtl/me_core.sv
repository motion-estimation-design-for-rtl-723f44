// me_core: motion estimation engine for one macroblock of the enhancement
// layer: parallel multi-resolution integer search with inter-layer
// prediction, mode filtering and single-pass fractional search.
//
// Flow for one MB (start .. done):
//   1. IME.  The three search levels run at the same time from their own
//      SRAMs: level 0 ([-8,7] around the INTER predictor, full resolution,
//      INTER and ILR SADs from one reference fetch), level 1 ([-32,30]
//      around (0,0), 4:1 subsampled), level 2 ([-128,124] around (0,0),
//      16:1 subsampled).  Four level-0 tree modules give the 16x16, 16x8,
//      8x16 and submode costs of INTER, ILR, ILM and ILMR; ILM/ILMR use the
//      sixteen up-sampled base-layer predictors mvp_ilm for their rate and
//      are disabled when any of them lies outside the level-0 window.
//   2. IBL.  The inter-BL and inter-BL-residual costs are computed at the
//      base-layer vectors from the level-0 SRAM (skipped when outside it).
//   3. Mode filtering: pre-selection, three best level-0 modes, multi-level
//      choice of the third candidate, IBL skip flags.
//   4. If a level-1/2 mode survives and needs FME, m2_req asks for the
//      37x37 window around m2_center (its integer vector) to be written
//      into the mode-2 SRAM; the engine waits for m2_ready.
//   5. FME (SPFME) of the surviving modes and the final decision.
// IME takes 147 cycles, IBL about 70, FME about 75 per mode.
//
// SRAM loading is external (we/waddr/wdata ports).  The level-0 window row
// r, column c holds frame pixel (MB + (mvp_inter>>2) - 11 + (c, r)); the
// level-1 window holds the 4:1 subsampled frame from offset -16 (in
// subsampled pixels) around the co-located MB, the level-2 window the 16:1
// subsampled frame from offset -32.  Subsampling takes the top-left pixel
// of each 2x2 / 4x4 group (for the current MB too).
//
// The blocks and their order follow the architecture.  Running IBL after
// IME on the same SRAM rather than beside it, and one level-0 SRAM per
// engine instead of three rotating ones, are this design's simplifications.
module me_core
  import me_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [7:0]               lambda,
  input  mv_t                      mvp_inter,
  input  mv_t  [15:0]              mvp_ilm,
  input  pix_t [15:0][15:0]        cur,
  input  res_t [15:0][15:0] upbr,
  // level-0 SRAM load
  input  logic                     l0_we,
  input  logic [5:0]               l0_waddr,
  input  pix_t [36:0]              l0_wdata,
  // level-1 SRAM load (8-pixel bank slices)
  input  logic                     l1_we,
  input  logic [7:0]               l1_waddr,
  input  logic [7:0]               l1_wbank,
  input  pix_t [7:0]               l1_wdata,
  // level-2 SRAM load (4-pixel bank slices)
  input  logic                     l2_we,
  input  logic [7:0]               l2_waddr,
  input  logic [7:0]               l2_wbank,
  input  pix_t [3:0]               l2_wdata,
  // mode-2 SRAM load for level-1/2 candidates
  output logic                     m2_req,
  output mv_t                      m2_center,
  input  logic                     m2_ready,
  input  logic                     m2_we,
  input  logic [5:0]               m2_waddr,
  input  pix_t [36:0]              m2_wdata,
  // results
  output logic                     busy,
  output logic                     done,
  output mode_t                    best,
  output mode_t [2:0]              ime_modes,
  output logic  [2:0]              ime_skip,
  output logic  [15:0]             elim,
  output logic                     ilm_ok,
  output logic                     ibl_ok,
  output logic  [1:0]              fme_nproc
);

  typedef enum logic [2:0] {S_IDLE, S_IME, S_IBL, S_MF, S_M2, S_FME} state_e;
  state_e st;

  // ---------------- current MB views ----------------
  cres_t [15:0][15:0] cur_res;
  pix_t [7:0][7:0] cur1;
  pix_t [3:0][3:0] cur2;
  always_comb begin
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++)
        cur_res[r][c] = 10'($signed({2'b0, cur[r][c]}) - $signed(upbr[r][c]));
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) cur1[r][c] = cur[2*r][2*c];
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) cur2[r][c] = cur[4*r][4*c];
  end

  logic ime_start;
  assign ime_start = (st == S_IDLE) && start;

  // ---------------- level 0 ----------------
  logic l0_rd, l0_busy, l0_ov, l0_done;
  logic [7:0] l0_ra, l0_rb;
  pix_t [36:0] l0_refa, l0_refb;
  logic [2:0] l0_j; logic [3:0] l0_p;
  logic [1:0][15:0][SAD4_W-1:0] l0_sad, l0_sadr;

  logic rd4_en; logic [5:0] rd4_row; pix_t [3:0][36:0] rd4_data;

  ref_sram_l0 u_sram0 (
    .clk, .we(l0_we), .waddr(l0_waddr), .wdata(l0_wdata),
    .rd_ab_en(l0_rd), .rd_a_row(l0_ra[5:0]), .rd_b_row(l0_rb[5:0]), .ref_a(l0_refa), .ref_b(l0_refb),
    .rd4_en, .rd4_row, .rd4_data
  );

  level_me #(.BW(16), .NPOS(2), .V(16), .G(8), .RES(1'b1), .RW(37), .ROW_OFF(3), .COL_OFF(3)) u_l0 (
    .clk, .rst_n, .start(ime_start), .cur, .cur_res,
    .rd_en(l0_rd), .rd_a_row(l0_ra), .rd_b_row(l0_rb), .ref_a(l0_refa), .ref_b(l0_refb),
    .busy(l0_busy), .out_valid(l0_ov), .out_j(l0_j), .out_p(l0_p),
    .out_sad(l0_sad), .out_sad_res(l0_sadr), .done(l0_done)
  );

  mv_t [1:0] l0_mv;
  always_comb
    for (int n = 0; n < 2; n++) begin
      l0_mv[n].x = ((mvp_inter.x >>> 2) + MV_W'(int'(l0_j) * 2 + n - 8)) <<< 2;
      l0_mv[n].y = ((mvp_inter.y >>> 2) + MV_W'(int'(l0_p) - 8)) <<< 2;
    end

  logic ilm_allowed;
  always_comb begin
    ilm_allowed = 1'b1;
    for (int b = 0; b < 16; b++) ilm_allowed &= in_window(mvp_ilm[b], mvp_inter);
  end

  mv_t [15:0] mvp_i;
  assign mvp_i = {16{mvp_inter}};

  mode_t [3:0][3:0] l0_res;
  l0_tree #(.PRED(P_INTER)) u_t_inter (.clk, .rst_n, .clear(ime_start), .enable(1'b1), .lambda,
    .mvp(mvp_i), .in_valid(l0_ov), .pos_mv(l0_mv), .sad4(l0_sad), .res(l0_res[0]));
  l0_tree #(.PRED(P_ILR)) u_t_ilr (.clk, .rst_n, .clear(ime_start), .enable(1'b1), .lambda,
    .mvp(mvp_i), .in_valid(l0_ov), .pos_mv(l0_mv), .sad4(l0_sadr), .res(l0_res[1]));
  l0_tree #(.PRED(P_ILM)) u_t_ilm (.clk, .rst_n, .clear(ime_start), .enable(ilm_allowed), .lambda,
    .mvp(mvp_ilm), .in_valid(l0_ov), .pos_mv(l0_mv), .sad4(l0_sad), .res(l0_res[2]));
  l0_tree #(.PRED(P_ILMR)) u_t_ilmr (.clk, .rst_n, .clear(ime_start), .enable(ilm_allowed), .lambda,
    .mvp(mvp_ilm), .in_valid(l0_ov), .pos_mv(l0_mv), .sad4(l0_sadr), .res(l0_res[3]));

  // ---------------- level 1 ----------------
  logic l1_rd, l1_busy, l1_ov, l1_done;
  logic [7:0] l1_ra, l1_rb;
  pix_t [39:0] l1_refa, l1_refb;
  logic [1:0] l1_j; logic [4:0] l1_p;
  logic [7:0][3:0][SAD4_W-1:0] l1_sad, l1_sadr_unused;
  ref_sram_lx #(.ROWS(39), .BANKW(8), .NBANK(5), .SPLIT(32)) u_sram1 (
    .clk, .we(l1_we), .waddr(l1_waddr), .wbank(l1_wbank), .wdata(l1_wdata),
    .rd_en(l1_rd), .rd_a_row(l1_ra), .rd_b_row(l1_rb), .ref_a(l1_refa), .ref_b(l1_refb));
  level_me #(.BW(8), .NPOS(8), .V(32), .G(4), .RES(1'b0), .RW(40), .ROW_OFF(0), .COL_OFF(0)) u_l1 (
    .clk, .rst_n, .start(ime_start), .cur(cur1), .cur_res('0),
    .rd_en(l1_rd), .rd_a_row(l1_ra), .rd_b_row(l1_rb), .ref_a(l1_refa), .ref_b(l1_refb),
    .busy(l1_busy), .out_valid(l1_ov), .out_j(l1_j), .out_p(l1_p),
    .out_sad(l1_sad), .out_sad_res(l1_sadr_unused), .done(l1_done));
  mv_t [7:0] l1_mv;
  always_comb
    for (int n = 0; n < 8; n++) begin
      l1_mv[n].x = MV_W'((int'(l1_j) * 8 + n - 16) * 8);
      l1_mv[n].y = MV_W'((int'(l1_p) - 16) * 8);
    end
  mode_t l1_mode;
  l1_tree #(.NPOS(8), .SHIFT(2)) u_t1 (.clk, .rst_n, .clear(ime_start), .lambda, .mvp(mvp_inter),
    .in_valid(l1_ov), .pos_mv(l1_mv), .sad4(l1_sad), .res(l1_mode));

  // ---------------- level 2 ----------------
  logic l2_rd, l2_busy, l2_ov, l2_done;
  logic [7:0] l2_ra, l2_rb;
  pix_t [67:0] l2_refa, l2_refb;
  logic [0:0] l2_j; logic [5:0] l2_p;
  logic [31:0][0:0][SAD4_W-1:0] l2_sad, l2_sadr_unused;
  ref_sram_lx #(.ROWS(67), .BANKW(4), .NBANK(17), .SPLIT(64)) u_sram2 (
    .clk, .we(l2_we), .waddr(l2_waddr), .wbank(l2_wbank), .wdata(l2_wdata),
    .rd_en(l2_rd), .rd_a_row(l2_ra), .rd_b_row(l2_rb), .ref_a(l2_refa), .ref_b(l2_refb));
  level_me #(.BW(4), .NPOS(32), .V(64), .G(2), .RES(1'b0), .RW(68), .ROW_OFF(0), .COL_OFF(0)) u_l2 (
    .clk, .rst_n, .start(ime_start), .cur(cur2), .cur_res('0),
    .rd_en(l2_rd), .rd_a_row(l2_ra), .rd_b_row(l2_rb), .ref_a(l2_refa), .ref_b(l2_refb),
    .busy(l2_busy), .out_valid(l2_ov), .out_j(l2_j), .out_p(l2_p),
    .out_sad(l2_sad), .out_sad_res(l2_sadr_unused), .done(l2_done));
  mv_t [31:0] l2_mv;
  logic [31:0][SAD4_W-1:0] l2_sadv;
  always_comb
    for (int n = 0; n < 32; n++) begin
      l2_mv[n].x = MV_W'((int'(l2_j) * 32 + n - 32) * 16);
      l2_mv[n].y = MV_W'((int'(l2_p) - 32) * 16);
      l2_sadv[n] = l2_sad[n][0];
    end
  mode_t l2_mode;
  l2_compare #(.NPOS(32), .SHIFT(4)) u_t2 (.clk, .rst_n, .clear(ime_start), .lambda, .mvp(mvp_inter),
    .in_valid(l2_ov), .pos_mv(l2_mv), .sad(l2_sadv), .res(l2_mode));

  // ---------------- IBL ----------------
  logic ibl_start, ibl_rd, ibl_busy, ibl_done;
  logic [5:0] ibl_row;
  mode_t ibl_m, iblr_m;
  ibl_unit u_ibl (
    .clk, .rst_n, .start(ibl_start), .mvp_inter, .mvd_ibl(mvp_ilm), .cur, .upbr,
    .rd_en(ibl_rd), .rd_row(ibl_row), .rd_data(rd4_data),
    .busy(ibl_busy), .done(ibl_done), .in_range(ibl_ok), .ibl(ibl_m), .iblr(iblr_m));

  // ---------------- mode filter ----------------
  logic mf_go, mf_done;
  mode_filter u_mf (
    .clk, .rst_n, .go(mf_go), .l0(l0_res), .ibl(ibl_m), .iblr(iblr_m), .l1(l1_mode), .l2(l2_mode),
    .done(mf_done), .modes(ime_modes), .skip(ime_skip), .elim);

  // ---------------- mode-2 SRAM and FME ----------------
  logic fme_start, fme_rd0, fme_rd1, fme_busy, fme_done;
  logic [5:0] fme_row;
  pix_t [3:0][36:0] m2_rd4;
  ref_sram_l0 u_sram_m2 (
    .clk, .we(m2_we), .waddr(m2_waddr), .wdata(m2_wdata),
    .rd_ab_en(1'b0), .rd_a_row('0), .rd_b_row('0), .ref_a(), .ref_b(),
    .rd4_en(fme_rd1), .rd4_row(fme_row), .rd4_data(m2_rd4));

  fme_luma u_fme (
    .clk, .rst_n, .start(fme_start), .modes(ime_modes), .skip(ime_skip), .mvp_inter,
    .m2_center, .lambda, .cur, .upbr,
    .rd0_en(fme_rd0), .rd1_en(fme_rd1), .rd_row(fme_row), .rd0_data(rd4_data), .rd1_data(m2_rd4),
    .busy(fme_busy), .done(fme_done), .best, .fme_cost(), .nproc(fme_nproc));

  assign rd4_en  = ibl_rd | fme_rd0;
  assign rd4_row = ibl_rd ? ibl_row : fme_row;

  // does a surviving level-1/2 candidate need the mode-2 SRAM?
  logic need_m2;
  always_comb begin
    need_m2   = 1'b0;
    m2_center = '0;
    for (int m = 0; m < 3; m++)
      if (ime_modes[m].valid && !ime_skip[m] &&
          (ime_modes[m].pred == P_L1 || ime_modes[m].pred == P_L2)) begin
        need_m2   = 1'b1;
        m2_center = ime_modes[m].mv[0];
      end
  end

  // ---------------- control ----------------
  logic sub_done;    // the three levels finished
  logic [2:0] lv_done;
  assign sub_done = &lv_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; lv_done <= '0; done <= 1'b0;
      ibl_start <= 1'b0; mf_go <= 1'b0; fme_start <= 1'b0;
    end else begin
      done <= 1'b0; ibl_start <= 1'b0; mf_go <= 1'b0; fme_start <= 1'b0;
      case (st)
        S_IDLE: if (start) begin lv_done <= '0; st <= S_IME; end
        S_IME: begin
          lv_done <= lv_done | {l2_done, l1_done, l0_done};
          if (sub_done) begin ibl_start <= 1'b1; st <= S_IBL; end
        end
        S_IBL: if (ibl_done) begin mf_go <= 1'b1; st <= S_MF; end
        S_MF: if (mf_done) begin
          if (need_m2) st <= S_M2;
          else begin fme_start <= 1'b1; st <= S_FME; end
        end
        S_M2: if (m2_ready) begin fme_start <= 1'b1; st <= S_FME; end
        S_FME: if (fme_done) begin done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign m2_req = (st == S_M2);
  assign ilm_ok = ilm_allowed;
  assign busy   = (st != S_IDLE);

endmodule
