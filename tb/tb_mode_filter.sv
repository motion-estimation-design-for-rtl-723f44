// Testbench for mode_filter: 300 random sets of 20 candidate costs (with
// some modes invalid, ties and IBL/IBLR/level-1/level-2 costs ranging from
// very cheap to very expensive).  A reference model applies the Type 1 /
// Type 2 pre-selection thresholds, the three-cheapest choice, the
// multi-level third candidate and the IBL skip rule; chosen modes, skip
// flags and cleared mode flags are compared.  Counts how often each rule
// fired and fails if one never did.
module tb_mode_filter;
  import me_pkg::*;
  logic clk = 0, rst_n = 1, go = 0, done;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  mode_t [3:0][3:0] l0;
  mode_t ibl, iblr, l1, l2;
  mode_t [2:0] modes;
  logic [2:0] skip;
  logic [15:0] elim;
  int checks = 0, failures = 0;
  int n_elim = 0, n_skip = 0, n_l1 = 0, n_l2 = 0, n_ibl_sel = 0;

  mode_filter dut (.clk, .rst_n, .go, .l0, .ibl, .iblr, .l1, .l2, .done, .modes, .skip, .elim);

  function automatic mode_t mk(pred_e p, part_e pt, int cost, bit v);
    mode_t m;
    m = '0; m.pred = p; m.part = pt; m.valid = v;
    m.cost = v ? cost_t'(cost) : COST_MAX;
    return m;
  endfunction
  function automatic bit okm(mode_t m); return m.valid && m.cost != COST_MAX; endfunction
  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 300; trial++) begin
      bit ilmv;
      bit fl [16];
      mode_t cand [18];
      bit av [18];
      mode_t best [3];
      mode_t third;
      ilmv = (trial % 5) != 0;
      for (int p = 0; p < 4; p++)
        for (int j = 0; j < 4; j++)
          l0[p][j] = mk(pred_e'(p), part_e'(j), int'($urandom_range(1000, 1400)) + ((trial % 7 == 0) ? 0 : 40 * p),
                        (p < 2) || ilmv);
      ibl  = mk(P_IBL,  BSUB, int'($urandom_range(900, 1600)), (trial % 3) != 0);
      iblr = mk(P_IBLR, BSUB, int'($urandom_range(900, 1600)), (trial % 3) != 0);
      l1   = mk(P_L1, B16X16, int'($urandom_range(800, 2000)), 1);
      l2   = mk(P_L2, B16X16, int'($urandom_range(800, 2400)), 1);
      // ---- model ----
      for (int i = 0; i < 16; i++) fl[i] = 1;
      for (int ty = 0; ty < 2; ty++) begin
        int a, b;
        a = ty; b = ty + 2;   // INTER/ILM, ILR/ILMR
        for (int j = 0; j < 4; j++) begin
          int w, ca, cb;
          w = 0;
          if (j != 3) begin
            for (int m = 0; m < 3; m++) begin
              int d;
              d = int'(l0[a][m].cost) - int'(l0[b][m].cost);
              w += (d < 0) ? -d : d;
            end
            w = w / 3;
          end
          ca = int'(l0[a][j].cost); cb = int'(l0[b][j].cost);
          if (okm(l0[a][j]) && okm(l0[b][j])) begin
            if (ca + w <= cb) fl[b*4+j] = 0;
            else if (cb + w <= ca) fl[a*4+j] = 0;
          end
        end
      end
      for (int i = 0; i < 16; i++) begin cand[i] = l0[i/4][i%4]; av[i] = fl[i] && okm(cand[i]); end
      cand[16] = ibl; av[16] = okm(ibl);
      cand[17] = iblr; av[17] = okm(iblr);
      for (int r = 0; r < 3; r++) begin
        int bi;
        bi = -1; best[r] = '0;
        for (int i = 0; i < 18; i++) if (av[i] && (bi < 0 || cand[i].cost < cand[bi].cost)) bi = i;
        if (bi >= 0) begin best[r] = cand[bi]; av[bi] = 0; end
      end
      third = best[2];
      if (okm(l1) && (!okm(third) || l1.cost < third.cost)) third = l1;
      if (okm(l2) && (!okm(third) || l2.cost < third.cost)) third = l2;
      best[2] = third;
      // ---- run ----
      go <= 1; @(posedge clk); go <= 0; #1;
      check("done", int'(done), 1);
      for (int r = 0; r < 3; r++) begin
        bit sk;
        check("pred", int'(modes[r].pred), int'(best[r].pred));
        check("part", int'(modes[r].part), int'(best[r].part));
        check("cost", int'(modes[r].cost), int'(best[r].cost));
        sk = best[r].valid && (best[r].pred == P_IBL || best[r].pred == P_IBLR);
        check("skip", int'(skip[r]), int'(sk));
        if (sk) n_skip++;
        if (sk) n_ibl_sel++;
      end
      if (modes[2].pred == P_L1) n_l1++;
      if (modes[2].pred == P_L2) n_l2++;
      for (int i = 0; i < 16; i++) check("elim", int'(elim[i]), int'(!fl[i]));
      for (int i = 0; i < 16; i++) if (!fl[i]) n_elim++;
      @(posedge clk);
    end
    $display("pre-selection eliminations %0d, IBL skips %0d, level-1 third %0d, level-2 third %0d",
             n_elim, n_skip, n_l1, n_l2);
    checks++; if (n_elim == 0) failures++;
    checks++; if (n_skip == 0) failures++;
    checks++; if (n_l1 == 0) failures++;
    checks++; if (n_l2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
