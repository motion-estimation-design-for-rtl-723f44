// mode_filter: reduces the up to 20 IME candidates of one macroblock to at
// most three modes for fractional motion estimation.
//
//  1. Pre-selection (Li's Type 1 and Type 2): for each partition j of
//     {16x16, 16x8, 8x16, submode}, INTER is compared with ILM (Type 1) and
//     ILR with ILMR (Type 2).  If cost_a[j] + w <= cost_b[j] the mode flag of
//     b is cleared (and symmetrically), where w = w1 = mean over the three
//     large partitions of |cost_a - cost_b|, and w = w2 = 0 for submode.
//  2. Level-0 choice: of the surviving level-0 modes plus IBL and IBLR (18
//     in all) the three cheapest are kept.
//  3. Multi-level filtering: the best and second-best level-0 modes become
//     candidates 0 and 1; candidate 2 is the cheapest of the third level-0
//     mode, the level-1 mode and the level-2 mode.
//  4. IBL skip: IBL and IBLR already use quarter-pel vectors, so an IBL or
//     IBLR candidate is flagged skip and its cost goes straight to the final
//     decision; FME then processes 1 to 3 modes.
//
// Interface: go (one cycle) samples all inputs; one cycle later done pulses
// and modes/skip/elim hold the result until the next go.  A candidate whose
// valid bit is 0 or whose cost is COST_MAX is never chosen; an output slot
// with no candidate has valid=0.  elim reports the cleared mode flags
// ([pred*4 + part] for INTER, ILR, ILM, ILMR).
//
// Steps 1-4 follow the architecture.  Keeping only one mode of a tied pair
// in step 1 and the tie order in steps 2-3 (lower index first) are this
// design's choices.
module mode_filter
  import me_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            go,
  input  mode_t [3:0][3:0] l0,      // [INTER, ILR, ILM, ILMR][part]
  input  mode_t           ibl,
  input  mode_t           iblr,
  input  mode_t           l1,
  input  mode_t           l2,
  output logic            done,
  output mode_t [2:0]     modes,
  output logic  [2:0]     skip,
  output logic  [15:0]    elim
);

  function automatic logic ok(input mode_t m);
    return m.valid && (m.cost != COST_MAX);
  endfunction

  logic [3:0][3:0] flag;       // [pred][part]

  // pairwise pre-selection between mode a and mode b
  function automatic logic [1:0] presel(input mode_t [3:0] a, input mode_t [3:0] b, input int j);
    logic [COST_W+1:0] sum, w;
    logic [1:0] kill;   // [0]: clear a, [1]: clear b
    sum = '0;
    for (int m = 0; m < 3; m++)
      sum = sum + ((a[m].cost > b[m].cost) ? (COST_W+2)'(a[m].cost - b[m].cost)
                                           : (COST_W+2)'(b[m].cost - a[m].cost));
    w = (j == 3) ? '0 : sum / 3;
    kill = 2'b00;
    if (ok(a[j]) && ok(b[j])) begin
      if ((COST_W+2)'(a[j].cost) + w <= (COST_W+2)'(b[j].cost)) kill = 2'b10;
      else if ((COST_W+2)'(b[j].cost) + w <= (COST_W+2)'(a[j].cost)) kill = 2'b01;
    end
    return kill;
  endfunction

  mode_t [2:0] sel;
  logic  [2:0] sel_skip;

  always_comb begin
    mode_t [17:0] cand;
    logic  [17:0] avail;
    mode_t [2:0]  best;
    mode_t        third;
    flag = '1;
    for (int j = 0; j < 4; j++) begin
      logic [1:0] k1, k2;
      k1 = presel(l0[0], l0[2], j);      // Type 1: INTER vs ILM
      k2 = presel(l0[1], l0[3], j);      // Type 2: ILR vs ILMR
      if (k1[0]) flag[0][j] = 1'b0;
      if (k1[1]) flag[2][j] = 1'b0;
      if (k2[0]) flag[1][j] = 1'b0;
      if (k2[1]) flag[3][j] = 1'b0;
    end
    for (int p = 0; p < 4; p++)
      for (int j = 0; j < 4; j++) begin
        cand[p*4+j]  = l0[p][j];
        avail[p*4+j] = flag[p][j] && ok(l0[p][j]);
      end
    cand[16] = ibl;  avail[16] = ok(ibl);
    cand[17] = iblr; avail[17] = ok(iblr);
    // three cheapest level-0 modes
    for (int r = 0; r < 3; r++) begin
      int bi;
      bi = -1;
      best[r] = '0;
      for (int i = 0; i < 18; i++)
        if (avail[i] && (bi < 0 || cand[i].cost < cand[bi].cost)) bi = i;
      if (bi >= 0) begin
        best[r] = cand[bi];
        avail[bi] = 1'b0;
      end
    end
    // multi-level choice of the third candidate
    third = best[2];
    if (ok(l1) && (!ok(third) || l1.cost < third.cost)) third = l1;
    if (ok(l2) && (!ok(third) || l2.cost < third.cost)) third = l2;
    sel[0] = best[0];
    sel[1] = best[1];
    sel[2] = third;
    for (int r = 0; r < 3; r++)
      sel_skip[r] = sel[r].valid && (sel[r].pred == P_IBL || sel[r].pred == P_IBLR);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done  <= 1'b0;
      modes <= '0;
      skip  <= '0;
      elim  <= '0;
    end else begin
      done <= go;
      if (go) begin
        modes <= sel;
        skip  <= sel_skip;
        elim  <= ~flag;
      end
    end
  end

endmodule
