// End-to-end testbench of me_top at its default size (two engines, full
// search ranges).  A smooth synthetic reference frame (bilinear upsampled
// random grid plus noise) is built; every macroblock is a displaced copy of
// it with noise, under five scenarios that exercise the mechanisms:
//   near  - motion within the level-0 window, base-layer vectors near it
//           (ILM enabled, IBL in range, pre-selection active);
//   far1  - motion of +-10..+-15 pixels: only level 1 reaches it, base-layer
//           vectors far away (ILM disabled, IBL skipped);
//   far2  - motion of +-40..+-100 pixels: only level 2 reaches it;
//   ibl   - half-pel motion with base-layer vectors and residual that match
//           it exactly (IBL / IBLR chosen and skipped in FME);
//   ilr   - the up-sampled base-layer residual explains the block.
// Each engine runs its own list of macroblocks; both run concurrently.  The
// testbench loads the level-0/1/2 windows before each start and serves
// m2_req by loading the mode-2 window.
// Checks: every reported IME mode cost equals a SAD + lambda*R model of its
// vectors; the final cost equals a SATD + lambda*R model of the refined
// vectors (H.264 interpolation); the final vector is within 3/4 pel of the
// true motion for near/far1 and within 2 pels for far2; ILM / IBL
// enables match the window rule; the per-MB cycle count (excluding the
// mode-2 window load) stays within the 454-cycle budget that two engines
// have at 135 MHz for CIF + 480p + 1080p at 60 frames/s.
module tb_me_top;
  import me_pkg::*;
  localparam int NC = 2;
  localparam int FS = 320;          // reference frame size
  localparam int MBX = 144, MBY = 144;
  localparam int NMB = 10;          // macroblocks per engine

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge

  logic [NC-1:0] start = '0;
  logic [NC-1:0][7:0] lambda;
  mv_t  [NC-1:0] mvp_inter;
  mv_t  [NC-1:0][15:0] mvp_ilm;
  pix_t [NC-1:0][15:0][15:0] cur;
  res_t [NC-1:0][15:0][15:0] upbr;
  logic [NC-1:0] l0_we = '0, l1_we = '0, l2_we = '0, m2_we = '0, m2_ready = '0;
  logic [NC-1:0][5:0] l0_waddr, m2_waddr;
  pix_t [NC-1:0][36:0] l0_wdata, m2_wdata;
  logic [NC-1:0][7:0] l1_waddr, l1_wbank, l2_waddr, l2_wbank;
  pix_t [NC-1:0][7:0] l1_wdata;
  pix_t [NC-1:0][3:0] l2_wdata;
  logic [NC-1:0] m2_req, busy, done, ilm_ok, ibl_ok;
  mv_t  [NC-1:0] m2_center;
  mode_t [NC-1:0] best;
  mode_t [NC-1:0][2:0] ime_modes;
  logic [NC-1:0][2:0] ime_skip;
  logic [NC-1:0][15:0] elim;
  logic [NC-1:0][1:0] fme_nproc;

  me_top dut (.*);

  int REF [FS][FS];
  int CUR [NC][16][16];
  int RES [NC][16][16];
  int checks = 0, failures = 0;
  int n_ilm_on = 0, n_ilm_off = 0, n_ibl_in = 0, n_ibl_out = 0, n_elim = 0, n_l1_third = 0, n_l2_third = 0;
  int n_m2 = 0, n_skip = 0, n_nproc_lt3 = 0, n_both_busy = 0, n_done [NC];
  int n_best [8];
  int max_lat = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 12) $display("%t %s: got %0d exp %0d", $time, what, got, exp); end
  endtask

  // ---------------- reference model ----------------
  function automatic int P(int x, int y);
    x = x < 0 ? 0 : x >= FS ? FS - 1 : x;
    y = y < 0 ? 0 : y >= FS ? FS - 1 : y;
    return REF[y][x];
  endfunction
  function automatic int clip(int v); return v < 0 ? 0 : v > 255 ? 255 : v; endfunction
  function automatic int t6(int a, int b, int c, int d, int e, int f); return a - 5*b + 20*c + 20*d - 5*e + f; endfunction
  function automatic int hb1(int x, int y); return t6(P(x-2, y), P(x-1, y), P(x, y), P(x+1, y), P(x+2, y), P(x+3, y)); endfunction
  function automatic int hb(int x, int y); return clip((hb1(x, y) + 16) >>> 5); endfunction
  function automatic int vh(int x, int y); return clip((t6(P(x, y-2), P(x, y-1), P(x, y), P(x, y+1), P(x, y+2), P(x, y+3)) + 16) >>> 5); endfunction
  function automatic int cj(int x, int y); return clip((t6(hb1(x, y-2), hb1(x, y-1), hb1(x, y), hb1(x, y+1), hb1(x, y+2), hb1(x, y+3)) + 512) >>> 10); endfunction
  // H.264 luma sample at quarter-pel frame position (qx, qy)
  function automatic int sample(int qx, int qy);
    int x, y, fx, fy, G, H, M, b, h, j, s, m;
    x = qx >>> 2; y = qy >>> 2; fx = qx & 3; fy = qy & 3;
    G = P(x, y); H = P(x+1, y); M = P(x, y+1);
    b = hb(x, y); h = vh(x, y); j = cj(x, y); s = hb(x, y+1); m = vh(x+1, y);
    case ({fx[1:0], fy[1:0]})
      4'b0000: return G;
      4'b0100: return (G + b + 1) >> 1;
      4'b1000: return b;
      4'b1100: return (b + H + 1) >> 1;
      4'b0001: return (G + h + 1) >> 1;
      4'b0010: return h;
      4'b0011: return (h + M + 1) >> 1;
      4'b1010: return j;
      4'b0101: return (b + h + 1) >> 1;
      4'b1101: return (b + m + 1) >> 1;
      4'b0111: return (h + s + 1) >> 1;
      4'b1111: return (m + s + 1) >> 1;
      4'b1001: return (b + j + 1) >> 1;
      4'b1011: return (j + s + 1) >> 1;
      4'b0110: return (h + j + 1) >> 1;
      default: return (j + m + 1) >> 1;
    endcase
  endfunction
  function automatic int satd4(int d [4][4]);
    int t [4][4];
    int u [4][4];
    int s;
    for (int r = 0; r < 4; r++) begin
      t[r][0] = d[r][0] + d[r][1] + d[r][2] + d[r][3];
      t[r][1] = d[r][0] + d[r][1] - d[r][2] - d[r][3];
      t[r][2] = d[r][0] - d[r][1] - d[r][2] + d[r][3];
      t[r][3] = d[r][0] - d[r][1] + d[r][2] - d[r][3];
    end
    for (int c = 0; c < 4; c++) begin
      u[0][c] = t[0][c] + t[1][c] + t[2][c] + t[3][c];
      u[1][c] = t[0][c] + t[1][c] - t[2][c] - t[3][c];
      u[2][c] = t[0][c] - t[1][c] - t[2][c] + t[3][c];
      u[3][c] = t[0][c] - t[1][c] + t[2][c] - t[3][c];
    end
    s = 0;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) s += (u[r][c] < 0) ? -u[r][c] : u[r][c];
    return (s + 1) >> 1;
  endfunction
  function automatic int se_bits(int v);
    int k, n;
    k = (v > 0) ? 2 * v - 1 : -2 * v;
    n = 0;
    while ((k + 1) >> (n + 1) != 0) n++;
    return 2 * n + 1;
  endfunction
  function automatic int pkey(int part, logic [3:0][1:0] sub, int b);
    int bx, by, q;
    bx = b % 4; by = b / 4; q = (by / 2) * 2 + bx / 2;
    case (part)
      0: return 0;
      1: return by / 2;
      2: return bx / 2;
      default: case (int'(sub[q]))
        0: return 4 * q;
        1: return 4 * q + by % 2;
        2: return 4 * q + bx % 2;
        default: return 4 * q + (by % 2) * 2 + bx % 2;
      endcase
    endcase
  endfunction
  function automatic bit is_res(pred_e p); return p == P_ILR || p == P_ILMR || p == P_IBLR; endfunction

  // IME cost of a mode: per partition, subsampled SAD scaled back + lambda*R
  function automatic int ime_cost(int e, mode_t m, int lam);
    int s, sh, tot;
    bit seen [16];
    s  = (m.pred == P_L1) ? 2 : (m.pred == P_L2) ? 4 : 1;
    sh = (m.pred == P_L1) ? 2 : (m.pred == P_L2) ? 4 : 0;
    tot = 0;
    for (int k = 0; k < 16; k++) seen[k] = 0;
    for (int b = 0; b < 16; b++) begin
      int k, sad, vx, vy;
      k = pkey(int'(m.part), m.sub, b);
      vx = int'(m.mv[b].x) >>> 2; vy = int'(m.mv[b].y) >>> 2;
      sad = 0;
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++) begin
          int px, py, d;
          px = (b % 4) * 4 + x; py = (b / 4) * 4 + y;
          if (px % s == 0 && py % s == 0) begin
            d = CUR[e][py][px] - (is_res(m.pred) ? RES[e][py][px] : 0) - P(MBX + px + vx, MBY + py + vy);
            sad += d < 0 ? -d : d;
          end
        end
      tot += sad << sh;
      if (!seen[k] && m.pred != P_IBL && m.pred != P_IBLR)
        tot += lam * (se_bits(int'(m.mv[b].x) - int'(m.mvp[b].x)) + se_bits(int'(m.mv[b].y) - int'(m.mvp[b].y)));
      seen[k] = 1;
    end
    return tot;
  endfunction

  // final cost of a mode: SATD at the quarter-pel vectors + lambda*R
  function automatic int fme_cost_model(int e, mode_t m, int lam);
    int tot;
    bit seen [16];
    tot = 0;
    for (int k = 0; k < 16; k++) seen[k] = 0;
    for (int b = 0; b < 16; b++) begin
      int k;
      int d [4][4];
      k = pkey(int'(m.part), m.sub, b);
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++) begin
          int px, py;
          px = (b % 4) * 4 + x; py = (b / 4) * 4 + y;
          d[y][x] = CUR[e][py][px] - (is_res(m.pred) ? RES[e][py][px] : 0)
                    - sample(4 * (MBX + px) + int'(m.mv[b].x), 4 * (MBY + py) + int'(m.mv[b].y));
        end
      tot += satd4(d);
      if (!seen[k] && m.pred != P_IBL && m.pred != P_IBLR)
        tot += lam * (se_bits(int'(m.mv[b].x) - int'(m.mvp[b].x)) + se_bits(int'(m.mv[b].y) - int'(m.mvp[b].y)));
      seen[k] = 1;
    end
    return tot;
  endfunction

  function automatic bit inwin(int v, int c);
    int d;
    d = (v >>> 2) - (c >>> 2);
    return d >= -8 && d <= 7;
  endfunction

  // ---------------- stimulus ----------------
  task automatic load_windows(int e, int cx, int cy);
    for (int r = 0; r < 37; r++) begin
      l0_we[e] <= 1; l0_waddr[e] <= 6'(r);
      for (int c = 0; c < 37; c++) l0_wdata[e][c] <= pix_t'(P(MBX + (cx >>> 2) - 11 + c, MBY + (cy >>> 2) - 11 + r));
      @(posedge clk);
    end
    l0_we[e] <= 0;
    for (int r = 0; r < 39; r++)
      for (int bk = 0; bk < 5; bk++) begin
        l1_we[e] <= 1; l1_waddr[e] <= 8'(r); l1_wbank[e] <= 8'(bk);
        for (int c = 0; c < 8; c++) l1_wdata[e][c] <= pix_t'(P(MBX + 2 * (bk * 8 + c - 16), MBY + 2 * (r - 16)));
        @(posedge clk);
      end
    l1_we[e] <= 0;
    for (int r = 0; r < 67; r++)
      for (int bk = 0; bk < 17; bk++) begin
        l2_we[e] <= 1; l2_waddr[e] <= 8'(r); l2_wbank[e] <= 8'(bk);
        for (int c = 0; c < 4; c++) l2_wdata[e][c] <= pix_t'(P(MBX + 4 * (bk * 4 + c - 32), MBY + 4 * (r - 32)));
        @(posedge clk);
      end
    l2_we[e] <= 0;
  endtask

  task automatic run_engine(int e);
    for (int i = 0; i < NMB; i++) begin
      int sc, tx, ty, cx, cy, lam, lat, m2wait, half;
      bit exp_ilm, exp_ibl;
      mode_t bm;
      sc = (i + 2 * e) % 5;
      lam = 4 + int'($urandom_range(0, 12));
      half = 0;
      case (sc)
        0: begin   // near
          cx = int'($urandom_range(0, 40)) - 20; cy = int'($urandom_range(0, 40)) - 20;
          tx = (cx >>> 2) + int'($urandom_range(0, 12)) - 6; ty = (cy >>> 2) + int'($urandom_range(0, 12)) - 6;
        end
        1: begin   // far, level 1
          cx = 0; cy = 0;
          tx = 2 * (int'($urandom_range(5, 7))) * (($urandom_range(0, 1) != 0) ? 1 : -1);
          ty = 2 * (int'($urandom_range(5, 7))) * (($urandom_range(0, 1) != 0) ? 1 : -1);
        end
        2: begin   // far, level 2
          cx = 0; cy = 0;
          tx = 4 * (int'($urandom_range(10, 25))) * (($urandom_range(0, 1) != 0) ? 1 : -1);
          ty = 4 * (int'($urandom_range(10, 25))) * (($urandom_range(0, 1) != 0) ? 1 : -1);
        end
        3: begin   // IBL: half-pel horizontal motion
          cx = int'($urandom_range(0, 40)) - 20; cy = int'($urandom_range(0, 40)) - 20;
          tx = (cx >>> 2) + int'($urandom_range(0, 8)) - 4; ty = (cy >>> 2) + int'($urandom_range(0, 8)) - 4;
          half = 1;
        end
        default: begin   // ILR
          cx = int'($urandom_range(0, 40)) - 20; cy = int'($urandom_range(0, 40)) - 20;
          tx = (cx >>> 2) + int'($urandom_range(0, 8)) - 4; ty = (cy >>> 2) + int'($urandom_range(0, 8)) - 4;
        end
      endcase
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++) begin
          int v;
          if (half) v = sample(4 * (MBX + x + tx) + 2, 4 * (MBY + y + ty));
          else      v = P(MBX + x + tx, MBY + y + ty);
          if (sc == 4) begin
            // block = reference + a strong pattern the residual carries
            RES[e][y][x] = ((x / 2 + y / 2) % 2 == 0) ? 40 : -40;
            CUR[e][y][x] = clip(v + RES[e][y][x]);
            RES[e][y][x] = CUR[e][y][x] - v;
          end else if (sc == 3) begin
            CUR[e][y][x] = v;
            RES[e][y][x] = 0;
          end else begin
            CUR[e][y][x] = clip(v + int'($urandom_range(0, 4)) - 2);
            RES[e][y][x] = int'($urandom_range(0, 4)) - 2;
          end
          cur[e][y][x] = pix_t'(CUR[e][y][x]);
          upbr[e][y][x] = res_t'(RES[e][y][x]);
        end
      for (int b = 0; b < 16; b++)
        if (sc == 0) begin
          mvp_ilm[e][b].x = MV_W'(4 * tx + int'($urandom_range(0, 6)) - 3);
          mvp_ilm[e][b].y = MV_W'(4 * ty + int'($urandom_range(0, 6)) - 3);
        end else if (sc == 3) begin
          mvp_ilm[e][b].x = MV_W'(4 * tx + 2);
          mvp_ilm[e][b].y = MV_W'(4 * ty);
        end else begin
          mvp_ilm[e][b].x = MV_W'(cx + 200);
          mvp_ilm[e][b].y = MV_W'(cy - 120);
        end
      mvp_inter[e].x = MV_W'(cx); mvp_inter[e].y = MV_W'(cy);
      lambda[e] = 8'(lam);
      exp_ilm = 1;
      for (int b = 0; b < 16; b++)
        exp_ilm &= inwin(int'(mvp_ilm[e][b].x), cx) && inwin(int'(mvp_ilm[e][b].y), cy);
      exp_ibl = exp_ilm;
      load_windows(e, cx, cy);
      start[e] <= 1; @(posedge clk); start[e] <= 0;
      lat = 1; m2wait = 0;
      while (!done[e]) begin
        if (m2_req[e] && !m2_ready[e]) begin
          int mx, my;
          mx = int'(m2_center[e].x); my = int'(m2_center[e].y);
          n_m2++;
          for (int r = 0; r < 37; r++) begin
            m2_we[e] <= 1; m2_waddr[e] <= 6'(r);
            for (int c = 0; c < 37; c++) m2_wdata[e][c] <= pix_t'(P(MBX + (mx >>> 2) - 11 + c, MBY + (my >>> 2) - 11 + r));
            @(posedge clk); lat++; m2wait++;
          end
          m2_we[e] <= 0; m2_ready[e] <= 1;
          @(posedge clk); lat++; m2wait++;
          m2_ready[e] <= 0;
        end else begin
          @(posedge clk); lat++;
        end
        if (lat > 5000) break;
      end
      #1;
      n_done[e]++;
      // ---- checks ----
      check("ilm_ok", int'(ilm_ok[e]), int'(exp_ilm));
      check("ibl_ok", int'(ibl_ok[e]), int'(exp_ibl));
      if (exp_ilm) n_ilm_on++; else n_ilm_off++;
      if (exp_ibl) n_ibl_in++; else n_ibl_out++;
      for (int k = 0; k < 3; k++) begin
        mode_t m;
        m = ime_modes[e][k];
        if (m.valid && m.cost != COST_MAX) begin
          if (m.pred == P_IBL || m.pred == P_IBLR)
            check("IBL cost", int'(m.cost), fme_cost_model(e, m, lam));
          else
            check("IME cost", int'(m.cost), ime_cost(e, m, lam));
        end
        if (ime_skip[e][k]) n_skip++;
      end
      if (ime_modes[e][2].pred == P_L1) n_l1_third++;
      if (ime_modes[e][2].pred == P_L2) n_l2_third++;
      n_elim += $countones(elim[e]);
      if (fme_nproc[e] < 3) n_nproc_lt3++;
      bm = best[e];
      n_best[int'(bm.pred)]++;
      check("final cost", int'(bm.cost), fme_cost_model(e, bm, lam));
      if (sc <= 2) begin
        int tol;
        tol = (sc == 2) ? 8 : 3;
        check("vector x near truth", int'(int'(bm.mv[0].x) - 4 * tx <= tol && 4 * tx - int'(bm.mv[0].x) <= tol), 1);
        check("vector y near truth", int'(int'(bm.mv[0].y) - 4 * ty <= tol && 4 * ty - int'(bm.mv[0].y) <= tol), 1);
      end
      if (sc == 3) check("IBL-type mode chosen", int'(bm.pred == P_IBL || bm.pred == P_IBLR), 1);
      if (sc == 4) check("residual mode chosen", int'(is_res(bm.pred)), 1);
      check("cycles within 454", int'(lat - m2wait <= 454), 1);
      if (lat - m2wait > max_lat) max_lat = lat - m2wait;
      @(posedge clk);
    end
  endtask

  always @(posedge clk) if (&busy) n_both_busy++;

  initial begin
    // smooth reference frame
    int g [FS/4 + 2][FS/4 + 2];
    for (int y = 0; y < FS/4 + 2; y++) for (int x = 0; x < FS/4 + 2; x++) g[y][x] = int'($urandom_range(20, 235));
    for (int y = 0; y < FS; y++)
      for (int x = 0; x < FS; x++) begin
        int gx, gy, fx, fy, v;
        gx = x / 4; gy = y / 4; fx = x % 4; fy = y % 4;
        v = ((4 - fx) * (4 - fy) * g[gy][gx] + fx * (4 - fy) * g[gy][gx+1] +
             (4 - fx) * fy * g[gy+1][gx] + fx * fy * g[gy+1][gx+1] + 8) / 16;
        REF[y][x] = clip(v + int'($urandom_range(0, 6)) - 3);
      end
    for (int k = 0; k < 8; k++) n_best[k] = 0;
    n_done[0] = 0; n_done[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    fork
      run_engine(0);
      run_engine(1);
    join
    $display("MBs engine0 %0d engine1 %0d, cycles both engines busy %0d", n_done[0], n_done[1], n_both_busy);
    $display("ILM enabled %0d disabled %0d; IBL in range %0d skipped %0d", n_ilm_on, n_ilm_off, n_ibl_in, n_ibl_out);
    $display("pre-selection eliminations %0d; level-1 third %0d, level-2 third %0d; mode-2 loads %0d",
             n_elim, n_l1_third, n_l2_third, n_m2);
    $display("IBL skip flags %0d; MBs with fewer than 3 FME modes %0d; worst ME cycles %0d",
             n_skip, n_nproc_lt3, max_lat);
    $display("best modes: INTER %0d ILR %0d ILM %0d ILMR %0d IBL %0d IBLR %0d L1 %0d L2 %0d",
             n_best[0], n_best[1], n_best[2], n_best[3], n_best[4], n_best[5], n_best[6], n_best[7]);
    check("both engines overlapped", int'(n_both_busy > 0), 1);
    check("ILM disabled seen", int'(n_ilm_off > 0 && n_ilm_on > 0), 1);
    check("IBL in and out of range seen", int'(n_ibl_in > 0 && n_ibl_out > 0), 1);
    check("pre-selection eliminated modes", int'(n_elim > 0), 1);
    check("level-1 and level-2 third candidates", int'(n_l1_third > 0 && n_l2_third > 0), 1);
    check("mode-2 SRAM loads", int'(n_m2 > 0), 1);
    check("IBL skip flags", int'(n_skip > 0), 1);
    check("fewer than 3 FME modes", int'(n_nproc_lt3 > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
