// interp_unit: luma fractional-sample interpolation for one 4x4 block and NC
// quarter-pel candidate positions.
//
// Window buffer: the 10x10 integer pixels around the block (3 columns/rows
// before it, 3 after it) are loaded four rows per cycle (ld, ld_grp = 0..2
// for rows 0-3, 4-7, 8-9), so a 4x4 block needs three load cycles.
// Half pels: every buffered row feeds five horizontal 6-tap FIRs
// (1,-5,20,20,-5,1) for the half positions between columns 2..7; every
// column feeds five vertical 6-tap FIRs for the half positions between rows
// 2..7, and the centre half pels are filtered vertically from the
// unrounded horizontal results, as H.264 prescribes.  Quarter pels: each
// candidate output pixel is the rounded average of the two nearest integer
// or half samples chosen by the H.264 rules (for diagonal quarter positions
// the two half samples that are neither integer nor centre).
//
// calc samples the window and the offsets off_x/off_y (quarter pel, -3..+3,
// relative to the integer block position); pred is registered one cycle
// later.  Loading the next block may begin in the same cycle as calc.
//
// The 10-pixel rows, five horizontal FIRs per row and four-row loading
// follow the architecture's interpolation unit; the window geometry
// (offset 3) is this design's choice that covers offsets of +-3/4 pel.
module interp_unit
  import me_pkg::*;
#(
  parameter int unsigned NC = 10
) (
  input  logic                        clk,
  input  logic                        ld,
  input  logic [1:0]                  ld_grp,
  input  pix_t [3:0][9:0]             ld_rows,
  input  logic                        calc,
  input  qoff_t [NC-1:0]   off_x,
  input  qoff_t [NC-1:0]   off_y,
  output pix_t [NC-1:0][3:0][3:0]     pred      // [cand][row][col]
);

  pix_t [9:0][9:0] win;    // [row][col]

  always_ff @(posedge clk)
    if (ld)
      for (int r = 0; r < 4; r++)
        if (int'(ld_grp) * 4 + r < 10) win[int'(ld_grp) * 4 + r] <= ld_rows[r];

  function automatic pix_t clip8(input int v);
    return (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : pix_t'(v);
  endfunction

  function automatic int tap6(input int a, input int b, input int c, input int d, input int e, input int f);
    return a - 5*b + 20*c + 20*d - 5*e + f;
  endfunction

  // half-sample plane on a doubled grid: p2[2r][2c] = integer pixel (r,c),
  // odd indices are half positions
  pix_t [18:0][18:0] p2;

  always_comb begin
    int b1 [10][10];     // unrounded horizontal half sample right of column c
    p2 = '0;
    for (int r = 0; r < 10; r++)
      for (int c = 0; c < 10; c++) begin
        p2[2*r][2*c] = win[r][c];
        b1[r][c] = 0;
      end
    for (int r = 0; r < 10; r++)
      for (int c = 2; c <= 6; c++) begin
        b1[r][c] = tap6(int'(win[r][c-2]), int'(win[r][c-1]), int'(win[r][c]),
                        int'(win[r][c+1]), int'(win[r][c+2]), int'(win[r][c+3]));
        p2[2*r][2*c+1] = clip8((b1[r][c] + 16) >>> 5);
      end
    for (int r = 2; r <= 6; r++)
      for (int c = 0; c < 10; c++)
        p2[2*r+1][2*c] = clip8((tap6(int'(win[r-2][c]), int'(win[r-1][c]), int'(win[r][c]),
                                     int'(win[r+1][c]), int'(win[r+2][c]), int'(win[r+3][c])) + 16) >>> 5);
    for (int r = 2; r <= 6; r++)
      for (int c = 2; c <= 6; c++)
        p2[2*r+1][2*c+1] = clip8((tap6(b1[r-2][c], b1[r-1][c], b1[r][c],
                                       b1[r+1][c], b1[r+2][c], b1[r+3][c]) + 512) >>> 10);
  end

  function automatic pix_t avg(input pix_t a, input pix_t b);
    return pix_t'((9'(a) + 9'(b) + 9'd1) >> 1);
  endfunction

  always_ff @(posedge clk)
    if (calc)
      for (int n = 0; n < int'(NC); n++)
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++) begin
            int qx, qy, ix, iy;
            qx = 4 * (x + 3) + int'(off_x[n]);
            qy = 4 * (y + 3) + int'(off_y[n]);
            ix = qx >>> 1;
            iy = qy >>> 1;
            case ({qy[0], qx[0]})
              2'b00: pred[n][y][x] <= p2[iy][ix];
              2'b01: pred[n][y][x] <= avg(p2[iy][ix], p2[iy][ix+1]);
              2'b10: pred[n][y][x] <= avg(p2[iy][ix], p2[iy+1][ix]);
              default:
                if (((ix + iy) % 2) == 0) pred[n][y][x] <= avg(p2[iy][ix+1], p2[iy+1][ix]);
                else                      pred[n][y][x] <= avg(p2[iy][ix], p2[iy+1][ix+1]);
            endcase
          end

endmodule
