// Testbench for ref_sram_lx in its level-1 shape (39 rows, five 8-pixel
// banks, part A = rows 0..31): writes every bank slice, reads A/B row pairs
// and compares with an array model; then rewrites one bank only and checks
// that the other banks kept their data.
module tb_ref_sram_lx;
  import me_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, rd_en = 0;
  logic [7:0] waddr, wbank, rd_a_row, rd_b_row;
  pix_t [7:0] wdata;
  pix_t [39:0] ref_a, ref_b;
  pix_t [39:0] model [39];
  int checks = 0, failures = 0;

  ref_sram_lx dut (.clk, .we, .waddr, .wbank, .wdata, .rd_en, .rd_a_row, .rd_b_row, .ref_a, .ref_b);

  task automatic write_bank(int b);
    for (int r = 0; r < 39; r++) begin
      for (int c = 0; c < 8; c++) model[r][b*8+c] = pix_t'($urandom);
      we <= 1; waddr <= 8'(r); wbank <= 8'(b); wdata <= model[r][b*8 +: 8];
      @(posedge clk);
    end
  endtask
  task automatic read_all();
    for (int a = 0; a < 32; a++) begin
      rd_en <= 1; rd_a_row <= 8'(a); rd_b_row <= 8'(32 + a % 7);
      @(posedge clk); rd_en <= 0; #1;
      checks++;
      if (ref_a != model[a] || ref_b != model[32 + a % 7]) begin failures++; $display("read %0d wrong", a); end
    end
  endtask

  initial begin
    for (int b = 0; b < 5; b++) write_bank(b);
    we <= 0;
    read_all();
    write_bank(2);
    we <= 0;
    read_all();
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
