// ref_sram_l0: reference window SRAM shared by level-0 IME and FME (and the
// IBL path).  It holds 37x37 pixels: the [-8,7] integer search range around
// the INTER predictor plus a 3-pixel margin on every side for interpolation.
//
// Organisation: two parts, A (rows 0..18) and B (rows 19..36), each 37
// pixels (296 bits) wide and split into four banks by row index
// (A: row mod 4, B: (row-19) mod 4), 5 words per bank.  Row 19 is written
// to both parts (its A copy sits in the otherwise unused fifth word of
// A's bank 3).  Two read modes, one per cycle:
//   * IME: one row of A and one row of B (rd_a_row, rd_b_row), as needed by
//     the A/B systolic search schedule;
//   * FME: four consecutive rows starting at rd4_row; consecutive rows fall
//     in distinct banks, so the four-row read never conflicts.  Rows beyond
//     36 read as zero.
// Reads are synchronous: data appear the cycle after the address.  One row
// is written per cycle (we, waddr, wdata) from external memory.
//
// Size, split, banking and the duplicated row follow the architecture; the
// port arrangement (separate IME and FME read modes, not used together) is
// this design's.
module ref_sram_l0
  import me_pkg::*;
#(
  parameter int unsigned RW = 37,
  parameter int unsigned NA = 19       // rows in part A
) (
  input  logic              clk,
  input  logic              we,
  input  logic [5:0]        waddr,
  input  pix_t [RW-1:0]     wdata,
  input  logic              rd_ab_en,
  input  logic [5:0]        rd_a_row,
  input  logic [5:0]        rd_b_row,
  output pix_t [RW-1:0]     ref_a,
  output pix_t [RW-1:0]     ref_b,
  input  logic              rd4_en,
  input  logic [5:0]        rd4_row,
  output pix_t [3:0][RW-1:0] rd4_data
);

  localparam int unsigned NROW = 2 * NA - 1;   // 37

  pix_t [RW-1:0] bank_a [4][5];
  pix_t [RW-1:0] bank_b [4][5];

  // write: row r -> A if r <= NA (row NA duplicated), B if r >= NA
  always_ff @(posedge clk)
    if (we) begin
      if (int'(waddr) <= int'(NA))
        bank_a[waddr % 4][waddr / 4] <= wdata;
      if (int'(waddr) >= int'(NA) && int'(waddr) < int'(NROW))
        bank_b[(waddr - 6'(NA)) % 4][(waddr - 6'(NA)) / 4] <= wdata;
    end

  // per-bank read address and the output slot it feeds
  logic [3:0][2:0] ra_w, rb_w;
  logic [3:0]      ra_en, rb_en;
  logic [3:0][1:0] ra_slot, rb_slot;   // rd4 row slot served by the bank
  always_comb begin
    int r;
    r = 0;
    ra_w = '0; rb_w = '0; ra_en = '0; rb_en = '0; ra_slot = '0; rb_slot = '0;
    if (rd4_en) begin
      for (int i = 0; i < 4; i++) begin
        r = int'(rd4_row) + i;
        if (r <= int'(NA)) begin
          ra_en[r % 4] = 1'b1; ra_w[r % 4] = 3'(r / 4); ra_slot[r % 4] = 2'(i);
        end else if (r < int'(NROW)) begin
          rb_en[(r - NA) % 4] = 1'b1; rb_w[(r - NA) % 4] = 3'((r - NA) / 4);
          rb_slot[(r - NA) % 4] = 2'(i);
        end
      end
    end else if (rd_ab_en) begin
      ra_en[rd_a_row % 4] = 1'b1; ra_w[rd_a_row % 4] = 3'(rd_a_row / 4);
      if (rd_b_row >= 6'(NA)) begin
        rb_en[(rd_b_row - 6'(NA)) % 4] = 1'b1;
        rb_w[(rd_b_row - 6'(NA)) % 4]  = 3'((rd_b_row - 6'(NA)) / 4);
      end
    end
  end

  pix_t [3:0][RW-1:0] qa, qb;
  logic [3:0]      qa_v, qb_v;
  logic [3:0][1:0] qa_slot, qb_slot;
  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      if (ra_en[k]) qa[k] <= bank_a[k][ra_w[k]];
      if (rb_en[k]) qb[k] <= bank_b[k][rb_w[k]];
    end
    qa_v <= ra_en; qb_v <= rb_en; qa_slot <= ra_slot; qb_slot <= rb_slot;
  end

  logic [1:0] a_bank_q, b_bank_q;
  always_ff @(posedge clk) begin
    a_bank_q <= 2'(rd_a_row % 4);
    b_bank_q <= 2'((rd_b_row - 6'(NA)) % 4);
  end

  assign ref_a = qa[a_bank_q];
  assign ref_b = qb[b_bank_q];

  always_comb begin
    rd4_data = '0;
    for (int k = 0; k < 4; k++) begin
      if (qa_v[k]) rd4_data[qa_slot[k]] = qa[k];
      if (qb_v[k]) rd4_data[qb_slot[k]] = qb[k];
    end
  end

  assert property (@(posedge clk) !(rd4_en && rd_ab_en))
    else $error("ref_sram_l0: IME and FME reads in the same cycle");

endmodule
