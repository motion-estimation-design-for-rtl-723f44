// frac_block_pipe: the fractional-pel block engine shared by the IBL path and
// FME luma.  For one 4x4 block per request it reads the 10x10 reference
// window from a level-0-format SRAM (four rows per read, three reads),
// interpolates NC quarter-pel candidates in interp_unit and computes their
// SATDs in NC satd_pu units, one candidate per PU.
//
// Pipeline (cycle 0 = request):
//   0..2  4-row SRAM reads of window rows 0-3, 4-7, 8-11
//   1..3  rows arrive in the interpolation buffer
//   4     interpolation of all candidates, registered
//   5..8  one predicted row per cycle into the PUs
//   9     out_valid with the NC SATDs and the request's tag
// Requests may be issued every 4 cycles, so the PUs stay busy; the caller
// keeps that cadence (there is no back-pressure).
//
// req_row/req_col locate the window's top-left pixel in the SRAM (block
// position minus 3); offsets are quarter pel relative to the block's
// integer position.  use_res[n] subtracts the up-sampled base-layer residual
// in candidate n.
//
// The four-row SRAM access, 3-cycle block interpolation and one-row-per-
// cycle PUs follow the architecture; the exact pipeline registers and the
// request interface are this design's.
module frac_block_pipe
  import me_pkg::*;
#(
  parameter int unsigned NC = 10,
  parameter int unsigned RW = 37
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       req,
  input  logic [5:0]                 req_row,
  input  logic [5:0]                 req_col,
  input  qoff_t [NC-1:0]  req_offx,
  input  qoff_t [NC-1:0]  req_offy,
  input  logic [NC-1:0]              req_use_res,
  input  pix_t [3:0][3:0]            req_cur,
  input  res_t [3:0][3:0] req_res,
  input  logic [7:0]                 req_tag,
  output logic                       rd_en,
  output logic [5:0]                 rd_row,
  input  pix_t [3:0][RW-1:0]         rd_data,
  output logic                       out_valid,
  output logic [7:0]                 out_tag,
  output logic [NC-1:0][15:0]        out_satd
);

  // request stage (valid from cycle 1 to 4)
  logic [5:0]                 s0_row, s0_col;
  qoff_t [NC-1:0]  s0_offx, s0_offy;
  logic [NC-1:0]              s0_use;
  pix_t [3:0][3:0]            s0_cur;
  res_t [3:0][3:0] s0_res;
  logic [7:0]                 s0_tag;
  // PU stage (valid from cycle 5 to 8)
  logic [NC-1:0]              s1_use;
  pix_t [3:0][3:0]            s1_cur;
  res_t [3:0][3:0] s1_res;
  logic [7:0]                 s1_tag, s2_tag;

  logic [8:1] d;     // d[i]: the request was i cycles ago

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d <= '0;
    else        d <= {d[7:1], req};
  end

  always_ff @(posedge clk) begin
    if (req) begin
      s0_row <= req_row;  s0_col <= req_col;
      s0_offx <= req_offx; s0_offy <= req_offy;
      s0_use <= req_use_res; s0_cur <= req_cur; s0_res <= req_res; s0_tag <= req_tag;
    end
    if (d[4]) begin
      s1_use <= s0_use; s1_cur <= s0_cur; s1_res <= s0_res; s1_tag <= s0_tag;
    end
    if (d[8]) s2_tag <= s1_tag;
  end

  // SRAM reads
  assign rd_en  = req | d[1] | d[2];
  assign rd_row = req ? req_row : (d[1] ? s0_row + 6'd4 : s0_row + 6'd8);

  // column selection of the returned rows
  pix_t [3:0][9:0] cols;
  always_comb
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 10; c++)
        cols[r][c] = (int'(s0_col) + c < int'(RW)) ? rd_data[r][int'(s0_col) + c] : '0;

  logic [1:0] grp;
  assign grp = d[1] ? 2'd0 : (d[2] ? 2'd1 : 2'd2);

  pix_t [NC-1:0][3:0][3:0] pred;

  interp_unit #(.NC(NC)) u_iu (
    .clk, .ld(d[1] | d[2] | d[3]), .ld_grp(grp), .ld_rows(cols),
    .calc(d[4]), .off_x(s0_offx), .off_y(s0_offy), .pred
  );

  // PU row feed
  logic [1:0] prow;
  assign prow = d[5] ? 2'd0 : d[6] ? 2'd1 : d[7] ? 2'd2 : 2'd3;

  logic [NC-1:0] pv;
  for (genvar n = 0; n < int'(NC); n++) begin : g_pu
    satd_pu u_pu (
      .clk, .rst_n,
      .in_valid(d[5] | d[6] | d[7] | d[8]), .in_first(d[5]),
      .cur(s1_cur[prow]), .pred(pred[n][prow]), .res(s1_res[prow]), .use_res(s1_use[n]),
      .out_valid(pv[n]), .satd(out_satd[n])
    );
  end

  assign out_valid = pv[0];
  assign out_tag   = s2_tag;

endmodule
