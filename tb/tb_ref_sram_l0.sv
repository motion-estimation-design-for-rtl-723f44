// Testbench for ref_sram_l0: writes all 37 rows of random data, then reads
// every A/B row pair in IME mode and every four-row group in FME mode
// (including groups crossing the A/B boundary and running past row 36) and
// compares with a plain array model; reads come one cycle after the address.
module tb_ref_sram_l0;
  import me_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, rd_ab_en = 0, rd4_en = 0;
  logic [5:0] waddr, rd_a_row, rd_b_row, rd4_row;
  pix_t [36:0] wdata, ref_a, ref_b;
  pix_t [3:0][36:0] rd4_data;
  pix_t [36:0] model [37];
  int checks = 0, failures = 0;

  ref_sram_l0 dut (.clk, .we, .waddr, .wdata, .rd_ab_en, .rd_a_row, .rd_b_row, .ref_a, .ref_b,
                   .rd4_en, .rd4_row, .rd4_data);

  initial begin
    for (int r = 0; r < 37; r++) begin
      for (int c = 0; c < 37; c++) model[r][c] = pix_t'($urandom);
      we <= 1; waddr <= 6'(r); wdata <= model[r];
      @(posedge clk);
    end
    we <= 0;
    for (int a = 0; a < 19; a++) begin
      rd_ab_en <= 1; rd_a_row <= 6'(a); rd_b_row <= 6'(19 + (a * 7) % 18);
      @(posedge clk); rd_ab_en <= 0; #1;
      checks++;
      if (ref_a != model[a] || ref_b != model[19 + (a * 7) % 18]) begin
        failures++; $display("IME read %0d wrong", a);
      end
    end
    for (int s = 0; s < 36; s++) begin
      rd4_en <= 1; rd4_row <= 6'(s);
      @(posedge clk); rd4_en <= 0; #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (s + i < 37 ? rd4_data[i] != model[s + i] : rd4_data[i] != '0) begin
          failures++; $display("FME read row %0d wrong", s + i);
        end
      end
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
