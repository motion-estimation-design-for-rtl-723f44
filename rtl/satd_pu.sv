// satd_pu: 4x4 block processing unit computing the SATD (sum of absolute
// Hadamard-transformed differences) of a block.
//
// Four PEs form the differences of one row per cycle: cur - pred, and when
// use_res is set also minus the up-sampled base-layer residual (ILR-type
// modes).  A 1-D 4-point Hadamard transform of the row is written into a
// transpose register array; with the fourth row the column transforms are
// taken and their absolute values summed.  Rows of consecutive blocks may
// follow each other without a gap.
//
// Interface: in_valid with in_first on the block's first row; satd is the
// registered result, out_valid pulses one cycle after the fourth row.
// satd = (sum + 1) >> 1, the usual normalisation of the 4x4 Hadamard SATD;
// that scaling is this design's choice.
module satd_pu
  import me_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_first,
  input  pix_t [3:0]            cur,
  input  pix_t [3:0]            pred,
  input  res_t [3:0] res,
  input  logic                  use_res,
  output logic                  out_valid,
  output logic [15:0]           satd
);

  typedef logic signed [13:0] coef_t;

  function automatic logic [55:0] had4(input coef_t a, input coef_t b, input coef_t c, input coef_t d);
    coef_t s0, s1, d0, d1;
    s0 = a + d; s1 = b + c; d0 = a - d; d1 = b - c;
    return {coef_t'(s0 + s1), coef_t'(d0 + d1), coef_t'(s0 - s1), coef_t'(d0 - d1)};
  endfunction

  coef_t [2:0][3:0] tr;      // transformed rows 0..2 of the current block
  coef_t [3:0]      hrow;    // transformed incoming row
  logic  [1:0]      row;

  always_comb begin
    coef_t [3:0] d;
    for (int i = 0; i < 4; i++)
      d[i] = coef_t'($signed({1'b0, cur[i]})) - coef_t'($signed({1'b0, pred[i]}))
             - (use_res ? coef_t'(res[i]) : coef_t'(0));
    {hrow[3], hrow[2], hrow[1], hrow[0]} = had4(d[0], d[1], d[2], d[3]);
  end

  logic [1:0] rown;
  assign rown = in_first ? 2'd0 : row;

  // column transforms of the finished block (rows 0..2 stored, row 3 live)
  logic [17:0] ssum;
  always_comb begin
    ssum = '0;
    for (int c = 0; c < 4; c++) begin
      coef_t [3:0] v;
      {v[3], v[2], v[1], v[0]} = had4(tr[0][c], tr[1][c], tr[2][c], hrow[c]);
      for (int k = 0; k < 4; k++) ssum = ssum + 18'(unsigned'(v[k] < 0 ? -v[k] : v[k]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row       <= '0;
      out_valid <= 1'b0;
      satd      <= '0;
      tr        <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        row <= rown + 1'b1;
        if (rown != 2'd3) tr[rown] <= hrow;
        else begin
          satd      <= 16'((ssum + 18'd1) >> 1);
          out_valid <= 1'b1;
        end
      end
    end
  end

endmodule
