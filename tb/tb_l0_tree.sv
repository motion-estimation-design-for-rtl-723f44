// Testbench for l0_tree (ILM configuration: a different predictor per 4x4
// block).  Random 4x4 SADs for two positions per cycle are fed over 40
// cycles; a reference model in the testbench keeps the best cost and vector
// of each of the 41 blocks (rate = signed Exp-Golomb length, computed here
// independently), then forms the 16x16, 16x8, 8x16 and submode results,
// which are compared with the block's outputs.  A second pass with
// enable=0 must report COST_MAX for all four partitions.
module tb_l0_tree;
  import me_pkg::*;
  logic clk = 0, rst_n = 1, clear = 0, enable = 1, in_valid = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  logic [7:0] lambda = 8'd4;
  mv_t [15:0] mvp;
  mv_t [1:0] pos_mv;
  logic [1:0][15:0][SAD4_W-1:0] sad4;
  mode_t [3:0] res;

  l0_tree #(.PRED(P_ILM)) dut (.clk, .rst_n, .clear, .enable, .lambda, .mvp, .in_valid, .pos_mv, .sad4, .res);

  int checks = 0, failures = 0;

  function automatic mv_t mk_mv(int x, int y);
    mv_t m;
    m.x = MV_W'(x); m.y = MV_W'(y);
    return m;
  endfunction
  int bc [41]; int bx [41]; int by [41];

  function automatic int eglen(int v);
    int code = (v > 0) ? 2*v - 1 : -2*v;
    int n = 0;
    while ((code + 1) >> (n + 1) != 0) n++;
    return 2*n + 1;
  endfunction

  // blocks as (x0, y0, w, h) in 4x4 units, same numbering as the module
  function automatic void geom(int i, output int x0, output int y0, output int w, output int h);
    if (i == 0) begin x0 = 0; y0 = 0; w = 4; h = 4; end
    else if (i <= 2) begin x0 = 0; y0 = 2*(i-1); w = 4; h = 2; end
    else if (i <= 4) begin x0 = 2*(i-3); y0 = 0; w = 2; h = 4; end
    else if (i <= 8) begin x0 = 2*((i-5)%2); y0 = 2*((i-5)/2); w = 2; h = 2; end
    else if (i <= 16) begin x0 = 2*(((i-9)/2)%2); y0 = 2*(((i-9)/2)/2) + (i-9)%2; w = 2; h = 1; end
    else if (i <= 24) begin x0 = 2*(((i-17)/2)%2) + (i-17)%2; y0 = 2*(((i-17)/2)/2); w = 1; h = 2; end
    else begin x0 = (i-25)%4; y0 = (i-25)/4; w = 1; h = 1; end
  endfunction

  function automatic int cost_of(int p, int i);
    int x0, y0, w, h, s, tl;
    geom(i, x0, y0, w, h);
    s = 0;
    for (int y = y0; y < y0+h; y++) for (int x = x0; x < x0+w; x++) s += int'(sad4[p][y*4+x]);
    tl = y0*4 + x0;
    return s + int'(lambda) * (eglen(int'(pos_mv[p].x) - int'(mvp[tl].x)) + eglen(int'(pos_mv[p].y) - int'(mvp[tl].y)));
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    for (int b = 0; b < 16; b++) mvp[b] = mk_mv(int'($urandom_range(0, 40)) - 20, int'($urandom_range(0, 40)) - 20);
    for (int i = 0; i < 41; i++) bc[i] = 32'h7fffffff;
    repeat (2) @(posedge clk);
    rst_n = 1;
    clear <= 1; @(posedge clk); clear <= 0;
    for (int t = 0; t < 40; t++) begin
      for (int p = 0; p < 2; p++) begin
        pos_mv[p] = mk_mv((int'($urandom_range(0, 15)) - 8) * 4, (int'($urandom_range(0, 15)) - 8) * 4);
        for (int b = 0; b < 16; b++) sad4[p][b] = SAD4_W'($urandom_range(0, 300));
      end
      in_valid = 1;
      for (int i = 0; i < 41; i++) begin
        int c0, c1, c, m;
        c0 = cost_of(0, i); c1 = cost_of(1, i);
        c = c0; m = 0;
        if (c1 < c0) begin c = c1; m = 1; end
        if (c < bc[i]) begin bc[i] = c; bx[i] = int'(pos_mv[m].x); by[i] = int'(pos_mv[m].y); end
      end
      @(posedge clk); #1;
    end
    in_valid = 0;
    #1;
    check("16x16", int'(res[0].cost), bc[0]);
    check("16x16 mv", int'(res[0].mv[5].x), bx[0]);
    check("16x8", int'(res[1].cost), bc[1] + bc[2]);
    check("16x8 mv", int'(res[1].mv[12].y), by[2]);
    check("8x16", int'(res[2].cost), bc[3] + bc[4]);
    check("8x16 mv", int'(res[2].mv[7].x), bx[4]);
    check("8x16 mvp", int'(res[2].mvp[7].x), int'(mvp[2].x));
    begin
      int tot = 0;
      for (int q = 0; q < 4; q++) begin
        int tl, c[4], m, s;
        tl = 8*(q/2) + 2*(q%2);
        c[0] = bc[5+q]; c[1] = bc[9+2*q] + bc[10+2*q]; c[2] = bc[17+2*q] + bc[18+2*q];
        c[3] = bc[25+tl] + bc[26+tl] + bc[29+tl] + bc[30+tl];
        m = c[0]; s = 0;
        for (int k = 1; k < 4; k++) if (c[k] < m) begin m = c[k]; s = k; end
        tot += m;
        check("subtype", int'(res[3].sub[q]), s);
        if (s == 3) check("sub 4x4 mv", int'(res[3].mv[tl+5].y), by[25+tl+5]);
        if (s == 0) check("sub 8x8 mv", int'(res[3].mv[tl].x), bx[5+q]);
      end
      check("submode", int'(res[3].cost), tot);
    end
    enable = 0;
    #1;
    for (int p = 0; p < 4; p++) check("disabled", int'(res[p].cost), int'(COST_MAX));
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
