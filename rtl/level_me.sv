// level_me: the "Level X ME module" of the multi-resolution integer search,
// with its reference selection and search scheduler.  One parameterised
// module serves all three levels:
//   level 0: BW=16 (full-resolution 16x16), NPOS=2 positions per cycle,
//            V=16 vertical x G=8 column groups = [-8,7]^2, residual SADs on
//   level 1: BW=8 (4:1 subsampled MB), NPOS=8, V=32, G=4 = [-32,30] step 2
//   level 2: BW=4 (16:1 subsampled MB), NPOS=32, V=64, G=2 = [-128,124] step 4
//
// Search order.  The window is cut into G column groups of NPOS horizontal
// positions.  In each group the V vertical positions are swept one per
// cycle, and a group's row package (NPOS+BW-1 pixels of one reference row)
// is shared by all NPOS positions.  Every current row k works on a different
// vertical position at once (systolic): in cycle t (q = t mod V, j = t div V)
// current row k uses reference row q of group j when k <= q, otherwise row
// q+V of group j-1.  The reference SRAM is therefore split into part A
// (rows 0..V-1) and part B (rows V..V+BW-2) and both parts are read every
// cycle; this is what keeps the search fully pipelined across groups.  The
// whole search takes G*V + BW - 1 read cycles (143 / 135 / 131).
//
// Datapath.  (BW/4)^2 sad_primitive units per position, NPOS positions:
// 32 primitives per level.  A 4x4 block in block row br finishes 4*br cycles
// before the bottom block row, so its SAD is delayed 4*(BW/4-1-br) cycles:
// all 4x4 SADs of one position then appear together.
//
// Interface.  start (one cycle) begins a search.  rd_a_row / rd_b_row are
// the SRAM row addresses (ROW_OFF added), valid with rd_en; the SRAM
// returns full rows ref_a / ref_b one cycle later.  out_valid marks one
// position-group result: column group out_j, vertical index out_p (0..V-1),
// and for each of the NPOS positions the 4x4 SADs in raster order.  The
// horizontal index of position n is out_j*NPOS+n.  done pulses with the
// last result.
//
// The level parameters, packages and cycle counts follow the architecture;
// the level-1 and level-2 parallelism of 8 and 32 positions follows its
// search-scheduling description.  Address offsets and the handshake are this
// design's own.
module level_me
  import me_pkg::*;
#(
  parameter int unsigned BW      = 16,
  parameter int unsigned NPOS    = 2,
  parameter int unsigned V       = 16,
  parameter int unsigned G       = 8,
  parameter bit          RES     = 1'b1,
  parameter int unsigned RW      = 37,
  parameter int unsigned ROW_OFF = 3,
  parameter int unsigned COL_OFF = 3,
  localparam int unsigned NB     = BW / 4,
  localparam int unsigned NBLK   = NB * NB,
  localparam int unsigned PW     = NPOS + BW - 1,
  localparam int unsigned T      = G * V + BW - 1,
  localparam int unsigned TW     = $clog2(T + 1),
  localparam int unsigned VW     = $clog2(V),
  localparam int unsigned GW     = (G > 1) ? $clog2(G) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  pix_t [BW-1:0][BW-1:0]       cur,
  input  cres_t [BW-1:0][BW-1:0] cur_res,
  output logic                        rd_en,
  output logic [7:0]                  rd_a_row,
  output logic [7:0]                  rd_b_row,
  input  pix_t [RW-1:0]               ref_a,
  input  pix_t [RW-1:0]               ref_b,
  output logic                        busy,
  output logic                        out_valid,
  output logic [GW-1:0]               out_j,
  output logic [VW-1:0]               out_p,
  output logic [NPOS-1:0][NBLK-1:0][SAD4_W-1:0] out_sad,
  output logic [NPOS-1:0][NBLK-1:0][SAD4_W-1:0] out_sad_res,
  output logic                        done
);

  // ---------------- scheduler ----------------
  logic [TW-1:0] t;
  logic          run;
  logic [VW-1:0] q0;

  assign q0 = t[VW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      t   <= '0;
    end else if (start) begin
      run <= 1'b1;
      t   <= '0;
    end else if (run) begin
      if (t == TW'(T - 1)) run <= 1'b0;
      t <= t + 1'b1;
    end
  end

  assign rd_en    = run;
  assign rd_a_row = 8'(ROW_OFF + q0);
  assign rd_b_row = 8'(ROW_OFF + V + q0);

  // tag pipeline: stage 1 = SRAM data present, stage 2 = primitive outputs
  logic          v1, v2;
  logic [TW-1:0] t1, t2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; t1 <= '0; t2 <= '0;
    end else begin
      v1 <= run;  t1 <= t;
      v2 <= v1;   t2 <= t1;
    end
  end

  // ---------------- reference selection ----------------
  logic [VW-1:0]    q1;
  logic [TW-VW-1:0] j1;
  assign q1 = t1[VW-1:0];
  assign j1 = t1[TW-1:VW];

  // package A starts at group j, package B at group j-1 (clamped at the
  // edges where the package is not used)
  pix_t [PW-1:0]          pkg_a, pkg_b;
  logic [7:0]             ba, bb;
  logic [RW*PIX_W-1:0]    sh_a, sh_b;
  assign ba    = (int'(j1) < int'(G)) ? 8'(COL_OFF + int'(j1) * NPOS) : 8'(COL_OFF);
  assign bb    = (j1 != 0)            ? 8'(COL_OFF + (int'(j1) - 1) * NPOS) : 8'(COL_OFF);
  assign sh_a  = ref_a >> (int'(ba) * PIX_W);
  assign sh_b  = ref_b >> (int'(bb) * PIX_W);
  assign pkg_a = sh_a[PW*PIX_W-1:0];
  assign pkg_b = sh_b[PW*PIX_W-1:0];

  // ---------------- SAD modules ----------------
  logic [NPOS-1:0][NBLK-1:0][SAD4_W-1:0] psad, psad_r;

  for (genvar n = 0; n < int'(NPOS); n++) begin : g_pos
    for (genvar br = 0; br < int'(NB); br++) begin : g_row    // row ME module
      logic [3:0] selb;
      always_comb
        for (int k = 0; k < 4; k++) selb[k] = (br * 4 + k) > int'(q1);
      for (genvar bc = 0; bc < int'(NB); bc++) begin : g_prim
        pix_t [3:0][3:0]               c4;
        cres_t [3:0][3:0]   cr4;
        pix_t [3:0]                    ra, rb;
        always_comb begin
          for (int k = 0; k < 4; k++)
            for (int c = 0; c < 4; c++) begin
              c4[k][c]  = cur[br*4+k][bc*4+c];
              cr4[k][c] = cur_res[br*4+k][bc*4+c];
            end
          for (int c = 0; c < 4; c++) begin
            ra[c] = pkg_a[n + bc*4 + c];
            rb[c] = pkg_b[n + bc*4 + c];
          end
        end
        sad_primitive #(.RES(RES)) u_prim (
          .clk, .cur(c4), .cur_res(cr4), .ref_a(ra), .ref_b(rb), .sel_b(selb),
          .sad(psad[n][br*NB+bc]), .sad_res(psad_r[n][br*NB+bc])
        );
      end
    end
  end

  // ---------------- block-row alignment ----------------
  logic [NPOS-1:0][NBLK-1:0][SAD4_W-1:0] asad, asad_r;

  for (genvar br = 0; br < int'(NB); br++) begin : g_align
    localparam int unsigned D = 4 * (NB - 1 - br);
    logic [NPOS-1:0][NB-1:0][SAD4_W-1:0] din, din_r, dout, dout_r;
    always_comb
      for (int n = 0; n < int'(NPOS); n++)
        for (int bc = 0; bc < int'(NB); bc++) begin
          din[n][bc]   = psad[n][br*NB+bc];
          din_r[n][bc] = psad_r[n][br*NB+bc];
        end
    if (D == 0) begin : g_nodly
      assign dout   = din;
      assign dout_r = din_r;
    end else begin : g_dly
      logic [D-1:0][NPOS-1:0][NB-1:0][SAD4_W-1:0] sr, sr_r;
      always_ff @(posedge clk) begin
        sr[0]   <= din;
        sr_r[0] <= din_r;
        for (int i = 1; i < int'(D); i++) begin
          sr[i]   <= sr[i-1];
          sr_r[i] <= sr_r[i-1];
        end
      end
      assign dout   = sr[D-1];
      assign dout_r = sr_r[D-1];
    end
    always_comb
      for (int n = 0; n < int'(NPOS); n++)
        for (int bc = 0; bc < int'(NB); bc++) begin
          asad[n][br*NB+bc]   = dout[n][bc];
          asad_r[n][br*NB+bc] = dout_r[n][bc];
        end
  end

  // ---------------- output ----------------
  logic [TW-1:0] tl;
  logic          emit, last;
  assign tl   = t2 - TW'(BW - 1);
  assign emit = v2 && (t2 >= TW'(BW - 1));
  assign last = v2 && (t2 == TW'(T - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      out_j     <= '0;
      out_p     <= '0;
    end else begin
      out_valid <= emit;
      done      <= last;
      out_j     <= GW'(tl >> VW);
      out_p     <= tl[VW-1:0];
    end
  end

  always_ff @(posedge clk) begin
    out_sad     <= asad;
    out_sad_res <= asad_r;
  end

  assign busy = run | v1 | v2;

endmodule
