// Testbench for l2_compare: 32 positions per cycle with random SADs over a
// full level-2 search (128 groups); the model scales by 16, adds lambda*R
// and tracks the strict minimum (earliest position wins ties).  The final
// cost and vector are compared, and a forced best planted in the middle of
// the search must be found.
module tb_l2_compare;
  import me_pkg::*;
  logic clk = 0, rst_n = 1, clear = 0, in_valid = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  logic [7:0] lambda = 8'd10;
  mv_t mvp;
  mv_t [31:0] pos_mv;
  logic [31:0][SAD4_W-1:0] sad;
  mode_t res;

  l2_compare dut (.clk, .rst_n, .clear, .lambda, .mvp, .in_valid, .pos_mv, .sad, .res);

  int checks = 0, failures = 0, bc, bx, by;
  function automatic int eglen(int v);
    int code, n;
    code = (v > 0) ? 2*v - 1 : -2*v;
    n = 0;
    while ((code + 1) >> (n + 1) != 0) n++;
    return 2*n + 1;
  endfunction
  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    mvp.x = 14'sd40; mvp.y = 14'sd8;
    bc = 32'h7fffffff;
    repeat (2) @(posedge clk);
    rst_n = 1;
    clear <= 1; @(posedge clk); clear <= 0;
    for (int t = 0; t < 128; t++) begin
      for (int n = 0; n < 32; n++) begin
        int s;
        pos_mv[n].x = MV_W'(((t / 64) * 32 + n - 32) * 16);
        pos_mv[n].y = MV_W'(((t % 64) - 32) * 16);
        sad[n] = SAD4_W'($urandom_range(200, 2000));
        if (t == 77 && n == 9) sad[n] = SAD4_W'(3);
        s = 16 * int'(sad[n]) + int'(lambda) * (eglen(int'(pos_mv[n].x) - int'(mvp.x)) + eglen(int'(pos_mv[n].y) - int'(mvp.y)));
        if (s < bc) begin bc = s; bx = int'(pos_mv[n].x); by = int'(pos_mv[n].y); end
      end
      in_valid = 1;
      @(posedge clk); #1;
    end
    in_valid = 0; #1;
    check("cost", int'(res.cost), bc);
    check("mvx", int'(res.mv[0].x), bx);
    check("mvy", int'(res.mv[11].y), by);
    check("planted", int'(res.mv[0].x), (32 + 9 - 32) * 16);
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
