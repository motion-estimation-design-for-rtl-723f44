// ref_sram_lx: reference SRAM of search level 1 or 2.  It holds the
// subsampled search window: level 1 39 rows x 40 pixels (five banks of 8
// pixel columns), level 2 67 rows x 68 pixels (17 banks of 4 columns).  The
// column banks match the macroblock width of the level, so moving to the
// next macroblock only one bank needs new data (bank-wise write: we_bank
// selects the bank, wdata is one BANKW-pixel slice of row waddr).
//
// For the A/B systolic search schedule the rows are split into part A
// (rows 0..SPLIT-1) and part B (rows SPLIT..ROWS-1); each part returns one
// full row per cycle (rd_a_row, rd_b_row), one cycle after the address.
//
// Sizes and column banking follow the architecture; the A/B row split is
// this design's way of feeding the same schedule level 0 uses.
module ref_sram_lx
  import me_pkg::*;
#(
  parameter int unsigned ROWS  = 39,
  parameter int unsigned BANKW = 8,
  parameter int unsigned NBANK = 5,
  parameter int unsigned SPLIT = 32,
  localparam int unsigned RW   = BANKW * NBANK
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [7:0]           waddr,
  input  logic [7:0]           wbank,
  input  pix_t [BANKW-1:0]     wdata,
  input  logic                 rd_en,
  input  logic [7:0]           rd_a_row,
  input  logic [7:0]           rd_b_row,
  output pix_t [RW-1:0]        ref_a,
  output pix_t [RW-1:0]        ref_b
);

  pix_t [BANKW-1:0] part_a [NBANK][SPLIT];
  pix_t [BANKW-1:0] part_b [NBANK][ROWS-SPLIT];

  always_ff @(posedge clk)
    if (we && int'(wbank) < int'(NBANK)) begin
      if (int'(waddr) < int'(SPLIT)) part_a[wbank][waddr] <= wdata;
      else if (int'(waddr) < int'(ROWS)) part_b[wbank][int'(waddr) - int'(SPLIT)] <= wdata;
    end

  always_ff @(posedge clk)
    if (rd_en)
      for (int k = 0; k < int'(NBANK); k++) begin
        if (int'(rd_a_row) < int'(SPLIT))
          ref_a[k*BANKW +: BANKW] <= part_a[k][rd_a_row];
        if (int'(rd_b_row) >= int'(SPLIT) && int'(rd_b_row) < int'(ROWS))
          ref_b[k*BANKW +: BANKW] <= part_b[k][int'(rd_b_row) - int'(SPLIT)];
      end

endmodule
