// Testbench for me_pkg's shared functions: signed Exp-Golomb code length
// and lambda*R motion-vector cost (against a counting model), saturating
// cost addition, the level-0 window test used by ILM and IBL, and the
// partition index of 4x4 blocks (same index exactly when same partition).
module tb_me_pkg;
  import me_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  function automatic int ref_len(int v);
    int k, n;
    k = (v > 0) ? 2 * v - 1 : -2 * v;   // code number
    n = 0;
    while ((k + 1) >> (n + 1) != 0) n++;
    return 2 * n + 1;
  endfunction

  initial begin
    // code lengths from the code table: 0 -> 1 bit, +-1 -> 3, +-2..3 -> 5 ...
    check("len(0)", int'(se_len(0)), 1);
    check("len(1)", int'(se_len(1)), 3);
    check("len(-1)", int'(se_len(-1)), 3);
    check("len(2)", int'(se_len(2)), 5);
    check("len(-4)", int'(se_len(-4)), 7);
    for (int i = 0; i < 400; i++) begin
      int v, lam, ax, ay, px, py;
      mv_t a, p;
      v = int'($urandom_range(0, 4000)) - 2000;
      check("se_len", int'(se_len((MV_W+1)'(v))), ref_len(v));
      lam = int'($urandom_range(0, 255));
      ax = int'($urandom_range(0, 2000)) - 1000; ay = int'($urandom_range(0, 2000)) - 1000;
      px = int'($urandom_range(0, 2000)) - 1000; py = int'($urandom_range(0, 2000)) - 1000;
      a.x = MV_W'(ax); a.y = MV_W'(ay); p.x = MV_W'(px); p.y = MV_W'(py);
      check("mv_cost", int'(mv_cost(8'(lam), a, p)), lam * (ref_len(ax - px) + ref_len(ay - py)));
      check("in_window", int'(in_window(a, p)),
            int'((ax >>> 2) - (px >>> 2) >= -8 && (ax >>> 2) - (px >>> 2) <= 7 &&
                 (ay >>> 2) - (py >>> 2) >= -8 && (ay >>> 2) - (py >>> 2) <= 7));
    end
    for (int i = 0; i < 200; i++) begin
      int a, b, s;
      a = int'($urandom_range(0, 1 << COST_W) );
      b = int'($urandom_range(0, 1 << (COST_W - 1)));
      if (a > int'(COST_MAX)) a = int'(COST_MAX);
      s = a + b;
      check("sat_add", int'(sat_add(cost_t'(a), cost_t'(b))), s > int'(COST_MAX) ? int'(COST_MAX) : s);
    end
    // partition index: blocks share an index exactly when they share a partition
    for (int pt = 0; pt < 4; pt++)
      for (int t = 0; t < 20; t++) begin
        logic [3:0][1:0] sub;
        for (int q = 0; q < 4; q++) sub[q] = 2'($urandom_range(0, 3));
        for (int b1 = 0; b1 < 16; b1++)
          for (int b2 = 0; b2 < 16; b2++) begin
            bit same;
            int x1, y1, x2, y2;
            x1 = b1 % 4; y1 = b1 / 4; x2 = b2 % 4; y2 = b2 / 4;
            case (pt)
              0: same = 1;
              1: same = (y1 / 2) == (y2 / 2);
              2: same = (x1 / 2) == (x2 / 2);
              default: begin
                same = (x1 / 2 == x2 / 2) && (y1 / 2 == y2 / 2);
                if (same)
                  case (int'(sub[(y1 / 2) * 2 + x1 / 2]))
                    1: same = (y1 == y2);
                    2: same = (x1 == x2);
                    3: same = (b1 == b2);
                    default: ;
                  endcase
              end
            endcase
            check("blk_pid", int'(blk_pid(part_e'(pt), sub, 4'(b1)) == blk_pid(part_e'(pt), sub, 4'(b2))), int'(same));
          end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
