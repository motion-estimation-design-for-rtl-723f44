// sad_primitive: SAD unit for one 4x4 block of the current macroblock.
//
// The four current rows of the block are held by the caller (cur) and, for
// the inter-layer residual (ILR) mode, the same rows with the up-sampled
// base-layer residual already subtracted (cur_res = cur - upBR).  Each cycle
// one 4-pixel reference row arrives from each SRAM part, ref_a and ref_b;
// sel_b[k] tells current row k to take the part-B row.  Current row k adds
// its row SAD to the partial sum handed down from row k-1 one cycle earlier,
// so the block SAD of one search position leaves a vertical systolic chain
// four cycles after its first row entered.  Both the INTER SAD |cur-ref| and
// the ILR SAD |cur-ref-upBR| are produced from the same reference data.
//
// Timing: sad / sad_res are registered; they hold the SAD of the position
// whose last (fourth) row was presented in the previous cycle.  A new
// position completes every cycle.
//
// The chain structure, the A/B reference inputs and the dual INTER/ILR
// output follow the primitive module of the architecture; the residual
// sharing of one reference fetch is its inter-layer addition.  RES=0 drops
// the residual half (used by the subsampled levels).
module sad_primitive
  import me_pkg::*;
#(
  parameter bit RES = 1'b1
) (
  input  logic                    clk,
  input  pix_t [3:0][3:0]         cur,      // [row][col]
  input  cres_t [3:0][3:0] cur_res, // cur - upBR, [row][col]
  input  pix_t [3:0]              ref_a,
  input  pix_t [3:0]              ref_b,
  input  logic [3:0]              sel_b,
  output logic [SAD4_W-1:0]       sad,
  output logic [SAD4_W-1:0]       sad_res
);

  logic [3:0][SAD4_W-1:0] rs, rs_r;    // row SADs of this cycle
  logic [2:0][SAD4_W-1:0] ps, ps_r;    // partial sums after rows 0..2

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      rs[k]   = '0;
      rs_r[k] = '0;
      for (int c = 0; c < 4; c++) begin
        logic signed [10:0] d, dr;
        logic [7:0] r;
        r  = sel_b[k] ? ref_b[c] : ref_a[c];
        d  = $signed({3'b0, cur[k][c]}) - $signed({3'b0, r});
        dr = 11'($signed(cur_res[k][c])) - $signed({3'b0, r});
        rs[k]   = rs[k]   + SAD4_W'(d  < 0 ? -d  : d);
        rs_r[k] = rs_r[k] + SAD4_W'(dr < 0 ? -dr : dr);
      end
    end
  end

  always_ff @(posedge clk) begin
    ps[0] <= rs[0];
    ps[1] <= ps[0] + rs[1];
    ps[2] <= ps[1] + rs[2];
    sad   <= ps[2] + rs[3];
  end

  if (RES) begin : g_res
    always_ff @(posedge clk) begin
      ps_r[0] <= rs_r[0];
      ps_r[1] <= ps_r[0] + rs_r[1];
      ps_r[2] <= ps_r[1] + rs_r[2];
      sad_res <= ps_r[2] + rs_r[3];
    end
  end else begin : g_nores
    assign ps_r    = '0;
    assign sad_res = '0;
  end

endmodule
