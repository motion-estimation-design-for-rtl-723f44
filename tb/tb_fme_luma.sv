// Testbench for fme_luma with two level-0-sized SRAMs (the level-0 window
// and the mode-2 window).  Each trial builds three candidate modes with
// random partitions, sub-partitions, vectors and fractional predictors:
// an INTER or ILM mode, an ILR/ILMR mode (residual subtracted) and either a
// level-1 mode (read from the mode-2 SRAM), an IBL mode flagged skip, or
// nothing.  The reference model evaluates the ten SPFME positions of every
// partition with H.264 interpolation, 4x4 Hadamard SATD and lambda * signed
// Exp-Golomb rate, picks the cheapest position per partition and the best
// mode overall; costs, refined vectors, the chosen mode and the number of
// processed modes are compared.  Cycle budget: <= 80 cycles per processed
// mode plus 8.
module tb_fme_luma;
  import me_pkg::*;
  logic clk = 0, rst_n = 1, start = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  mode_t [2:0] modes;
  logic [2:0] skip;
  mv_t mvp_inter, m2_center;
  logic [7:0] lambda;
  pix_t [15:0][15:0] cur;
  res_t [15:0][15:0] upbr;
  logic rd0_en, rd1_en, busy, done;
  logic [5:0] rd_row;
  pix_t [3:0][36:0] rd0_data, rd1_data;
  mode_t best;
  cost_t [2:0] fme_cost;
  logic [1:0] nproc;
  logic we = 0;
  logic [1:0] wsel;
  logic [5:0] waddr;
  pix_t [36:0] wdata;
  int W [2][40][40];
  int ws;
  int CUR [16][16];
  int RES [16][16];
  int checks = 0, failures = 0, n_proc3 = 0, n_skip_win = 0, n_l1 = 0, n_lt3 = 0, n_pf = 0, max_cyc = 0;

  // ---- reference model (H.264 interpolation and SATD) ----

  function automatic int clip(int v); return v < 0 ? 0 : v > 255 ? 255 : v; endfunction
  function automatic int t6(int a, int b, int c, int d, int e, int f); return a - 5*b + 20*c + 20*d - 5*e + f; endfunction
  function automatic int hb1(int x, int y); return t6(W[ws][y][x-2], W[ws][y][x-1], W[ws][y][x], W[ws][y][x+1], W[ws][y][x+2], W[ws][y][x+3]); endfunction
  function automatic int hb(int x, int y); return clip((hb1(x, y) + 16) >>> 5); endfunction
  function automatic int vh(int x, int y); return clip((t6(W[ws][y-2][x], W[ws][y-1][x], W[ws][y][x], W[ws][y+1][x], W[ws][y+2][x], W[ws][y+3][x]) + 16) >>> 5); endfunction
  function automatic int cj(int x, int y); return clip((t6(hb1(x, y-2), hb1(x, y-1), hb1(x, y), hb1(x, y+1), hb1(x, y+2), hb1(x, y+3)) + 512) >>> 10); endfunction

  // luma sample at quarter-pel position (qx, qy) of the window
  function automatic int sample(int qx, int qy);
    int x, y, fx, fy, G, H, M, b, h, j, s, m;
    x = qx >>> 2; y = qy >>> 2; fx = qx & 3; fy = qy & 3;
    G = W[ws][y][x]; H = W[ws][y][x+1]; M = W[ws][y+1][x];
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

  // SATD of a 4x4 difference block: (sum |Hadamard| + 1) >> 1
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

  // quarter-pel window coordinate of pixel (px, py) of the macroblock when
  // displaced by a vector (vx, vy) and the window is centred on the integer
  // part of the predictor (cx, cy): the window origin is 8 + 3 pixels up-left
  function automatic int wq(int p, int v, int c);
    return 4 * (p + 11 + (v >>> 2) - (c >>> 2)) + (v & 3);
  endfunction

  // SATD of 4x4 block (bx, by) of cur at vector (vx, vy); res subtracted when r
  function automatic int blk_satd(int bx, int by, int vx, int vy, int cx, int cy, bit r);
    int d [4][4];
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++)
        d[y][x] = CUR[by*4+y][bx*4+x] - (r ? RES[by*4+y][bx*4+x] : 0)
                  - sample(wq(bx*4+x, vx, cx), wq(by*4+y, vy, cy));
    return satd4(d);
  endfunction

  fme_luma dut (.clk, .rst_n, .start, .modes, .skip, .mvp_inter, .m2_center, .lambda, .cur, .upbr,
                .rd0_en, .rd1_en, .rd_row, .rd0_data, .rd1_data, .busy, .done, .best, .fme_cost, .nproc);
  ref_sram_l0 u_s0 (.clk, .we(we && wsel == 0), .waddr, .wdata, .rd_ab_en(1'b0), .rd_a_row(6'd0), .rd_b_row(6'd0),
                    .ref_a(), .ref_b(), .rd4_en(rd0_en), .rd4_row(rd_row), .rd4_data(rd0_data));
  ref_sram_l0 u_s1 (.clk, .we(we && wsel == 1), .waddr, .wdata, .rd_ab_en(1'b0), .rd_a_row(6'd0), .rd_b_row(6'd0),
                    .ref_a(), .ref_b(), .rd4_en(rd1_en), .rd4_row(rd_row), .rd4_data(rd1_data));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  function automatic int se_bits(int v);
    int k, n;
    k = (v > 0) ? 2 * v - 1 : -2 * v;
    n = 0;
    while ((k + 1) >> (n + 1) != 0) n++;
    return 2 * n + 1;
  endfunction

  // partition key of 4x4 block b (raster) for a partition type and sub types
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

  function automatic int pf(int mvp, int mv); return ((mvp - mv + 2) & 3) - 2; endfunction

  // random mode: vectors per partition within [-8,7] of the integer centre
  function automatic mode_t mk_mode(pred_e p, int cx, int cy);
    mode_t m;
    int vx [16];
    int vy [16];
    int px [16];
    int py [16];
    m = '0; m.valid = 1; m.pred = p;
    m.part = part_e'($urandom_range(0, 3));
    for (int q = 0; q < 4; q++) m.sub[q] = 2'($urandom_range(0, 3));
    if (m.part != BSUB) m.sub = '0;
    for (int k = 0; k < 16; k++) begin
      vx[k] = 4 * ((cx >>> 2) + int'($urandom_range(0, 15)) - 8);
      vy[k] = 4 * ((cy >>> 2) + int'($urandom_range(0, 15)) - 8);
      px[k] = int'($urandom_range(0, 80)) - 40;
      py[k] = int'($urandom_range(0, 80)) - 40;
    end
    for (int b = 0; b < 16; b++) begin
      int k;
      k = pkey(int'(m.part), m.sub, b);
      m.mv[b].x = MV_W'(vx[k]);  m.mv[b].y = MV_W'(vy[k]);
      m.mvp[b].x = MV_W'(vx[k] + px[k]); m.mvp[b].y = MV_W'(vy[k] + py[k]);
    end
    m.cost = cost_t'($urandom_range(3000, 9000));
    return m;
  endfunction

  // model FME of one mode: returns cost, fills refined vectors
  function automatic int model_fme(mode_t m, int cx, int cy, int lam, bit r, output mode_t o);
    int ox [10];
    int oy [10];
    int acc [16][10];
    bit seen [16];
    int total;
    o = m;
    for (int k = 0; k < 16; k++) begin seen[k] = 0; for (int c = 0; c < 10; c++) acc[k][c] = 0; end
    for (int b = 0; b < 16; b++) begin
      int k, mx, my, fx, fy;
      k = pkey(int'(m.part), m.sub, b);
      mx = int'(m.mv[b].x); my = int'(m.mv[b].y);
      fx = pf(int'(m.mvp[b].x), mx); fy = pf(int'(m.mvp[b].y), my);
      ox = '{0, -1, 1, -1, 1, fx, fx, fx, fx - 1, fx + 1};
      oy = '{0, -1, -1, 1, 1, fy, fy - 1, fy + 1, fy, fy};
      for (int c = 0; c < 10; c++) begin
        acc[k][c] += blk_satd(b % 4, b / 4, mx + ox[c], my + oy[c], cx, cy, r);
        if (!seen[k]) acc[k][c] += lam * (se_bits(mx + ox[c] - int'(m.mvp[b].x)) + se_bits(my + oy[c] - int'(m.mvp[b].y)));
      end
      seen[k] = 1;
    end
    total = 0;
    for (int k = 0; k < 16; k++)
      if (seen[k]) begin
        int bc;
        bc = 0;
        for (int c = 1; c < 10; c++) if (acc[k][c] < acc[k][bc]) bc = c;
        total += acc[k][bc];
        for (int b = 0; b < 16; b++)
          if (pkey(int'(m.part), m.sub, b) == k) begin
            int fx, fy;
            fx = pf(int'(m.mvp[b].x), int'(m.mv[b].x)); fy = pf(int'(m.mvp[b].y), int'(m.mv[b].y));
            ox = '{0, -1, 1, -1, 1, fx, fx, fx, fx - 1, fx + 1};
            oy = '{0, -1, -1, 1, 1, fy, fy - 1, fy + 1, fy, fy};
            o.mv[b].x = MV_W'(int'(m.mv[b].x) + ox[bc]);
            o.mv[b].y = MV_W'(int'(m.mv[b].y) + oy[bc]);
            if (bc >= 5) n_pf++;
          end
      end
    o.cost = cost_t'(total);
    return total;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 12; trial++) begin
      int cx, cy, c2x, c2y, lam, kind, np, cyc;
      mode_t exp_m [3];
      int exp_c [3];
      bit proc [3];
      mode_t eb;
      for (int s = 0; s < 2; s++) begin
        for (int r = 0; r < 40; r++) for (int c = 0; c < 40; c++) W[s][r][c] = 0;
        for (int r = 0; r < 37; r++) for (int c = 0; c < 37; c++) W[s][r][c] = int'($urandom_range(0, 255));
        for (int r = 0; r < 37; r++) begin
          we <= 1; wsel <= 2'(s); waddr <= 6'(r);
          for (int c = 0; c < 37; c++) wdata[c] <= pix_t'(W[s][r][c]);
          @(posedge clk);
        end
      end
      we <= 0;
      for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) begin
        // current block: the reference shifted by a small amount plus noise,
        // so that SATD and rate are of comparable size
        CUR[y][x] = clip(W[0][y + 11][x + 11] + int'($urandom_range(0, 16)) - 8);
        RES[y][x] = int'($urandom_range(0, 20)) - 10;
        cur[y][x] = pix_t'(CUR[y][x]);
        upbr[y][x] = res_t'(RES[y][x]);
      end
      cx = int'($urandom_range(0, 200)) - 100; cy = int'($urandom_range(0, 200)) - 100;
      c2x = 8 * (int'($urandom_range(0, 16)) - 8); c2y = 8 * (int'($urandom_range(0, 16)) - 8);
      lam = int'($urandom_range(1, 40));
      kind = trial % 3;
      mvp_inter.x = MV_W'(cx); mvp_inter.y = MV_W'(cy);
      m2_center.x = MV_W'(c2x); m2_center.y = MV_W'(c2y);
      lambda = 8'(lam);
      modes[0] = mk_mode((trial % 2) ? P_ILM : P_INTER, cx, cy);
      modes[1] = mk_mode((trial % 2) ? P_ILMR : P_ILR, cx, cy);
      skip = 3'b000;
      if (kind == 0) begin
        modes[2] = '0; modes[2].valid = 1; modes[2].pred = P_L1; modes[2].part = B16X16;
        for (int b = 0; b < 16; b++) begin
          modes[2].mv[b].x = MV_W'(c2x); modes[2].mv[b].y = MV_W'(c2y);
          modes[2].mvp[b].x = MV_W'(cx); modes[2].mvp[b].y = MV_W'(cy);
        end
        modes[2].cost = 5000;
      end else if (kind == 1) begin
        modes[2] = mk_mode(P_IBL, cx, cy);
        modes[2].cost = cost_t'((trial % 2) ? 10 : 60000);
        skip = 3'b100;
      end else begin
        modes[2] = '0; modes[2].cost = COST_MAX;
      end
      // model
      np = 0;
      for (int k = 0; k < 3; k++) begin
        proc[k] = modes[k].valid && !skip[k];
        exp_m[k] = modes[k];
        exp_c[k] = int'(COST_MAX);
        if (proc[k]) begin
          bit isl1, isr;
          isl1 = modes[k].pred == P_L1;
          isr = modes[k].pred == P_ILR || modes[k].pred == P_ILMR;
          ws = isl1 ? 1 : 0;
          exp_c[k] = model_fme(modes[k], isl1 ? c2x : cx, isl1 ? c2y : cy, lam, isr, exp_m[k]);
          np++;
        end
      end
      eb = '0; eb.cost = COST_MAX;
      for (int k = 0; k < 3; k++)
        if ((proc[k] || (skip[k] && modes[k].valid)) && exp_m[k].cost < eb.cost) eb = exp_m[k];
      // run
      start <= 1; @(posedge clk); start <= 0;
      cyc = 1;
      while (!done) begin @(posedge clk); cyc++; end
      #1;
      if (cyc > max_cyc) max_cyc = cyc;
      check("cycle budget", int'(cyc <= 80 * np + 8), 1);
      check("nproc", int'(nproc), np);
      for (int k = 0; k < 3; k++) check("fme_cost", int'(fme_cost[k]), exp_c[k]);
      check("best.pred", int'(best.pred), int'(eb.pred));
      check("best.cost", int'(best.cost), int'(eb.cost));
      for (int b = 0; b < 16; b++) begin
        check("best.mv.x", int'(best.mv[b].x), int'(eb.mv[b].x));
        check("best.mv.y", int'(best.mv[b].y), int'(eb.mv[b].y));
      end
      if (np == 3) n_proc3++;
      if (np < 3) n_lt3++;
      if (kind == 0) n_l1++;
      if (skip[2] && eb.pred == P_IBL) n_skip_win++;
      @(posedge clk);
    end
    $display("3 modes refined %0d, fewer than 3 %0d, level-1 mode via mode-2 SRAM %0d, skipped IBL won %0d, pred-frac picks %0d, worst %0d cycles",
             n_proc3, n_lt3, n_l1, n_skip_win, n_pf, max_cyc);
    check("pred-frac positions used", int'(n_pf > 0), 1);
    check("skipped mode selected", int'(n_skip_win > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
