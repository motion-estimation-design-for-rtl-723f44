// Testbench for interp_unit: random 10x10 windows and ten random quarter-pel
// offsets in -3..+3.  The reference is written from the H.264 luma sample
// equations case by case (G, a..s named samples, e.g. e = (b+h+1)>>1,
// j from unrounded intermediates), independent of the half-sample plane the
// block builds.  Also checks the three-cycle window load and one-cycle
// result latency.
module tb_interp_unit;
  import me_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic ld = 0, calc = 0;
  logic [1:0] ld_grp;
  pix_t [3:0][9:0] ld_rows;
  qoff_t [9:0] off_x, off_y;
  pix_t [9:0][3:0][3:0] pred;
  int W [10][10];
  int checks = 0, failures = 0;

  interp_unit #(.NC(10)) dut (.clk, .ld, .ld_grp, .ld_rows, .calc, .off_x, .off_y, .pred);

  function automatic int clip(int v); return v < 0 ? 0 : v > 255 ? 255 : v; endfunction
  function automatic int t6(int a, int b, int c, int d, int e, int f); return a - 5*b + 20*c + 20*d - 5*e + f; endfunction
  function automatic int hb1(int x, int y); return t6(W[y][x-2], W[y][x-1], W[y][x], W[y][x+1], W[y][x+2], W[y][x+3]); endfunction
  function automatic int hb(int x, int y); return clip((hb1(x, y) + 16) >>> 5); endfunction
  function automatic int vh(int x, int y); return clip((t6(W[y-2][x], W[y-1][x], W[y][x], W[y+1][x], W[y+2][x], W[y+3][x]) + 16) >>> 5); endfunction
  function automatic int cj(int x, int y); return clip((t6(hb1(x, y-2), hb1(x, y-1), hb1(x, y), hb1(x, y+1), hb1(x, y+2), hb1(x, y+3)) + 512) >>> 10); endfunction

  // luma sample at quarter position (qx, qy) in window coordinates
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
      default: return (j + m + 1) >> 1;   // 1110
    endcase
  endfunction

  initial begin
    for (int trial = 0; trial < 40; trial++) begin
      for (int r = 0; r < 10; r++) for (int c = 0; c < 10; c++) W[r][c] = (trial % 4 == 0) ? 255 * int'($urandom_range(0, 1)) : int'($urandom_range(0, 255));
      for (int g = 0; g < 3; g++) begin
        ld <= 1; ld_grp <= 2'(g);
        for (int r = 0; r < 4; r++) for (int c = 0; c < 10; c++) ld_rows[r][c] <= pix_t'(g*4 + r < 10 ? W[g*4+r][c] : 0);
        @(posedge clk);
      end
      ld <= 0;
      for (int n = 0; n < 10; n++) begin
        off_x[n] <= 3'($urandom_range(0, 6) - 3);
        off_y[n] <= 3'($urandom_range(0, 6) - 3);
      end
      calc <= 1;
      @(posedge clk);
      calc <= 0;
      #1;
      for (int n = 0; n < 10; n++)
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
          int e;
          e = sample(4*(x+3) + int'(off_x[n]), 4*(y+3) + int'(off_y[n]));
          checks++;
          if (int'(pred[n][y][x]) != e) begin
            failures++;
            if (failures < 6) $display("trial %0d cand %0d off (%0d,%0d) px (%0d,%0d): %0d exp %0d", trial, n,
                                       off_x[n], off_y[n], x, y, pred[n][y][x], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
