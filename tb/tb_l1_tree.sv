// Testbench for l1_tree and, in the same run style, the level-1 cost rules:
// 8 positions per cycle with random 8x8-block SADs; the model scales SADs
// by 4, adds lambda*R (signed Exp-Golomb lengths against the predictor),
// keeps the best of each of the nine blocks and picks the cheapest of the
// four partitionings.  Cost, partition and vectors are compared.
module tb_l1_tree;
  import me_pkg::*;
  logic clk = 0, rst_n = 1, clear = 0, in_valid = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  logic [7:0] lambda = 8'd6;
  mv_t mvp;
  mv_t [7:0] pos_mv;
  logic [7:0][3:0][SAD4_W-1:0] sad4;
  mode_t res;

  l1_tree dut (.clk, .rst_n, .clear, .lambda, .mvp, .in_valid, .pos_mv, .sad4, .res);

  int checks = 0, failures = 0;
  int bc [9]; int bmx [9]; int bmy [9];
  function automatic int eglen(int v);
    int code, n;
    code = (v > 0) ? 2*v - 1 : -2*v;
    n = 0;
    while ((code + 1) >> (n + 1) != 0) n++;
    return 2*n + 1;
  endfunction
  function automatic int memb(int i, int k);
    case (i)
      0: return 1;
      1: return (k < 2);
      2: return (k >= 2);
      3: return (k % 2 == 0);
      4: return (k % 2 == 1);
      default: return (k == i - 5);
    endcase
  endfunction
  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    mvp.x = 14'sd12; mvp.y = -14'sd20;
    for (int i = 0; i < 9; i++) bc[i] = 32'h7fffffff;
    repeat (2) @(posedge clk);
    rst_n = 1;
    clear <= 1; @(posedge clk); clear <= 0;
    for (int t = 0; t < 30; t++) begin
      for (int n = 0; n < 8; n++) begin
        pos_mv[n].x = MV_W'((t % 4) * 64 + n * 8 - 128);
        pos_mv[n].y = MV_W'((t / 4) * 8 - 128);
        for (int k = 0; k < 4; k++) sad4[n][k] = SAD4_W'($urandom_range(0, 200));
      end
      in_valid = 1;
      for (int n = 0; n < 8; n++)
        for (int i = 0; i < 9; i++) begin
          int s;
          s = 0;
          for (int k = 0; k < 4; k++) if (memb(i, k) != 0) s += 4 * int'(sad4[n][k]);
          s += int'(lambda) * (eglen(int'(pos_mv[n].x) - int'(mvp.x)) + eglen(int'(pos_mv[n].y) - int'(mvp.y)));
          if (s < bc[i]) begin bc[i] = s; bmx[i] = int'(pos_mv[n].x); bmy[i] = int'(pos_mv[n].y); end
        end
      @(posedge clk); #1;
    end
    in_valid = 0; #1;
    begin
      int c[4], m, p;
      c[0] = bc[0]; c[1] = bc[1] + bc[2]; c[2] = bc[3] + bc[4]; c[3] = bc[5] + bc[6] + bc[7] + bc[8];
      m = c[0]; p = 0;
      for (int k = 1; k < 4; k++) if (c[k] < m) begin m = c[k]; p = k; end
      check("cost", int'(res.cost), m);
      check("part", int'(res.part), p);
      check("pred", int'(res.pred), int'(P_L1));
      case (p)
        0: check("mv", int'(res.mv[15].x), bmx[0]);
        1: check("mv", int'(res.mv[15].y), bmy[2]);
        2: check("mv", int'(res.mv[15].x), bmx[4]);
        default: check("mv", int'(res.mv[15].y), bmy[8]);
      endcase
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
