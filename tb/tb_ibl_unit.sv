// Testbench for ibl_unit with a level-0 SRAM: random reference windows,
// current blocks, up-sampled residuals and per-4x4 base-layer vectors with
// random quarter-pel fractions.  Expected IBL / IBLR costs are the sums of
// the sixteen 4x4 SATDs computed from the H.264 interpolation equations.
// Also checks vectors, mode labels, the out-of-window skip (cost COST_MAX,
// not valid) and the start-to-done latency (<= 75 cycles in range).
module tb_ibl_unit;
  import me_pkg::*;
  logic clk = 0, rst_n = 1, start = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  mv_t mvp_inter;
  mv_t [15:0] mvd_ibl;
  pix_t [15:0][15:0] cur;
  res_t [15:0][15:0] upbr;
  logic rd_en, busy, done, in_range;
  logic [5:0] rd_row;
  pix_t [3:0][36:0] rd_data;
  mode_t ibl, iblr;
  logic we = 0;
  logic [5:0] waddr;
  pix_t [36:0] wdata;
  int W [40][40];
  int CUR [16][16];
  int RES [16][16];
  int checks = 0, failures = 0, n_in = 0, n_out = 0, max_lat = 0;

  // ---- reference model (H.264 interpolation and SATD) ----

  function automatic int clip(int v); return v < 0 ? 0 : v > 255 ? 255 : v; endfunction
  function automatic int t6(int a, int b, int c, int d, int e, int f); return a - 5*b + 20*c + 20*d - 5*e + f; endfunction
  function automatic int hb1(int x, int y); return t6(W[y][x-2], W[y][x-1], W[y][x], W[y][x+1], W[y][x+2], W[y][x+3]); endfunction
  function automatic int hb(int x, int y); return clip((hb1(x, y) + 16) >>> 5); endfunction
  function automatic int vh(int x, int y); return clip((t6(W[y-2][x], W[y-1][x], W[y][x], W[y+1][x], W[y+2][x], W[y+3][x]) + 16) >>> 5); endfunction
  function automatic int cj(int x, int y); return clip((t6(hb1(x, y-2), hb1(x, y-1), hb1(x, y), hb1(x, y+1), hb1(x, y+2), hb1(x, y+3)) + 512) >>> 10); endfunction

  // luma sample at quarter-pel position (qx, qy) of the window
  function automatic int sample(int qx, int qy);
    int x, y, fx, fy, G, H, M, b, h, j, s, m;
    x = qx >>> 2; y = qy >>> 2; fx = qx & 3; fy = qy & 3;
    G = W[y][x]; H = W[y][x+1]; M = W[y+1][x];
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

  ibl_unit dut (.clk, .rst_n, .start, .mvp_inter, .mvd_ibl, .cur, .upbr, .rd_en, .rd_row, .rd_data,
                .busy, .done, .in_range, .ibl, .iblr);
  ref_sram_l0 u_sram (.clk, .we, .waddr, .wdata, .rd_ab_en(1'b0), .rd_a_row(6'd0), .rd_b_row(6'd0),
                      .ref_a(), .ref_b(), .rd4_en(rd_en), .rd4_row(rd_row), .rd4_data(rd_data));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 24; trial++) begin
      int e0, e1, lat, cx, cy;
      bit outside;
      for (int r = 0; r < 40; r++) for (int c = 0; c < 40; c++) W[r][c] = 0;
      for (int r = 0; r < 37; r++) for (int c = 0; c < 37; c++) W[r][c] = int'($urandom_range(0, 255));
      for (int r = 0; r < 37; r++) begin
        we <= 1; waddr <= 6'(r);
        for (int c = 0; c < 37; c++) wdata[c] <= pix_t'(W[r][c]);
        @(posedge clk);
      end
      we <= 0;
      for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) begin
        CUR[y][x] = int'($urandom_range(0, 255));
        RES[y][x] = int'($urandom_range(0, 60)) - 30;
        cur[y][x] = pix_t'(CUR[y][x]);
        upbr[y][x] = res_t'(RES[y][x]);
      end
      cx = int'($urandom_range(0, 400)) - 200;
      cy = int'($urandom_range(0, 400)) - 200;
      mvp_inter.x = MV_W'(cx); mvp_inter.y = MV_W'(cy);
      outside = (trial % 4) == 3;
      for (int b = 0; b < 16; b++) begin
        int ix, iy;
        ix = (cx >>> 2) + int'($urandom_range(0, 15)) - 8;
        iy = (cy >>> 2) + int'($urandom_range(0, 15)) - 8;
        if (outside && b == int'(trial % 16)) iy = (cy >>> 2) + ((trial % 8 == 3) ? 8 : -9);
        mvd_ibl[b].x = MV_W'(4 * ix + int'($urandom_range(0, 3)));
        mvd_ibl[b].y = MV_W'(4 * iy + int'($urandom_range(0, 3)));
      end
      e0 = 0; e1 = 0;
      if (!outside)
        for (int b = 0; b < 16; b++) begin
          e0 += blk_satd(b % 4, b / 4, int'(mvd_ibl[b].x), int'(mvd_ibl[b].y), cx, cy, 0);
          e1 += blk_satd(b % 4, b / 4, int'(mvd_ibl[b].x), int'(mvd_ibl[b].y), cx, cy, 1);
        end
      start <= 1; @(posedge clk); start <= 0;
      lat = 1;
      while (!done) begin @(posedge clk); lat++; end
      #1;
      check("in_range", int'(in_range), int'(!outside));
      check("ibl.valid", int'(ibl.valid), int'(!outside));
      check("iblr.valid", int'(iblr.valid), int'(!outside));
      check("ibl.pred", int'(ibl.pred), int'(P_IBL));
      check("iblr.pred", int'(iblr.pred), int'(P_IBLR));
      if (outside) begin
        n_out++;
        check("ibl.cost skip", int'(ibl.cost), int'(COST_MAX));
        check("iblr.cost skip", int'(iblr.cost), int'(COST_MAX));
      end else begin
        n_in++;
        if (lat > max_lat) max_lat = lat;
        check("ibl.cost", int'(ibl.cost), e0);
        check("iblr.cost", int'(iblr.cost), e1);
        for (int b = 0; b < 16; b++) begin
          check("mv.x", int'(ibl.mv[b].x), int'(mvd_ibl[b].x));
          check("mv.y", int'(iblr.mv[b].y), int'(mvd_ibl[b].y));
        end
      end
      @(posedge clk);
    end
    $display("in range %0d, skipped %0d, worst latency %0d cycles", n_in, n_out, max_lat);
    check("latency within 75", int'(max_lat <= 75), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
