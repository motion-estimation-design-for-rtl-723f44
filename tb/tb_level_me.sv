// Testbench for level_me at its level-0 defaults (16x16 block, 2 positions
// per cycle, [-8,7] search, INTER and ILR SADs).  A behavioural 37x37 row
// memory with one-cycle read latency stands in for the reference SRAM.
// Every 4x4 SAD of every position (INTER and residual) is recomputed here
// directly from the window and compared; the search must end exactly
// G*V+BW-1 read cycles after start and report every position once.
module tb_level_me;
  import me_pkg::*;
  localparam int BW = 16, NPOS = 2, V = 16, G = 8, RW = 37, OFF = 3;
  localparam int NB = BW/4, NBLK = NB*NB, T = G*V + BW - 1;

  logic clk = 0, rst_n = 1, start = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge

  pix_t [BW-1:0][BW-1:0] cur;
  cres_t [BW-1:0][BW-1:0] cur_res;
  logic signed [8:0] upbr [BW][BW];
  pix_t mem [RW][RW];
  logic rd_en; logic [7:0] ra, rb;
  pix_t [RW-1:0] ref_a, ref_b;
  logic busy, out_valid, done;
  logic [2:0] out_j; logic [3:0] out_p;
  logic [NPOS-1:0][NBLK-1:0][SAD4_W-1:0] out_sad, out_sad_res;

  level_me dut (.clk, .rst_n, .start, .cur, .cur_res, .rd_en, .rd_a_row(ra), .rd_b_row(rb),
                .ref_a, .ref_b, .busy, .out_valid, .out_j, .out_p, .out_sad, .out_sad_res, .done);

  always_ff @(posedge clk) begin
    for (int c = 0; c < RW; c++) begin
      ref_a[c] <= mem[ra % RW][c];
      ref_b[c] <= mem[rb % RW][c];
    end
  end

  int checks = 0, failures = 0, cyc = 0, t_start, t_done, seen = 0;
  bit hit [G*NPOS][V];

  always_ff @(posedge clk) cyc <= cyc + 1;

  function automatic int exp_sad(int x, int y, int blk, bit res);
    int s = 0, br = blk / NB, bc = blk % NB;
    for (int k = 0; k < 4; k++)
      for (int c = 0; c < 4; c++) begin
        int cv = cur[br*4+k][bc*4+c] - (res ? int'(upbr[br*4+k][bc*4+c]) : 0);
        int d  = cv - int'(mem[OFF+y+br*4+k][OFF+x+bc*4+c]);
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  always @(posedge clk) if (out_valid) begin
    for (int n = 0; n < NPOS; n++) begin
      int x, y;
      x = int'(out_j)*NPOS + n;
      y = int'(out_p);
      hit[x][y] = 1;
      for (int b = 0; b < NBLK; b++) begin
        checks++;
        if (int'(out_sad[n][b]) != exp_sad(x, y, b, 0) ||
            int'(out_sad_res[n][b]) != exp_sad(x, y, b, 1)) begin
          failures++;
          if (failures < 5) $display("mismatch pos (%0d,%0d) blk %0d: %0d/%0d exp %0d/%0d", x, y, b,
                                     out_sad[n][b], out_sad_res[n][b], exp_sad(x, y, b, 0), exp_sad(x, y, b, 1));
        end
      end
    end
  end

  initial begin
    for (int r = 0; r < RW; r++) for (int c = 0; c < RW; c++) mem[r][c] = pix_t'($urandom);
    for (int r = 0; r < BW; r++) for (int c = 0; c < BW; c++) begin
      cur[r][c]  = pix_t'($urandom);
      upbr[r][c] = 9'($signed($urandom_range(0, 200)) - 100);
      cur_res[r][c] = 10'($signed({2'b0, cur[r][c]}) - upbr[r][c]);
    end
    foreach (hit[i, j]) hit[i][j] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1; t_start = cyc;
    @(posedge clk);
    start <= 0;
    wait (done);
    t_done = cyc;
    repeat (3) @(posedge clk);
    foreach (hit[i, j]) if (hit[i][j]) seen++;
    checks++;
    if (seen != G*NPOS*V) begin failures++; $display("positions seen %0d", seen); end
    checks++;
    // start register, T read cycles, then SRAM, primitive, output register
    if (t_done - t_start != T + 4) begin failures++; $display("latency %0d", t_done - t_start); end
    $display("search took %0d cycles (%0d read cycles)", t_done - t_start, T);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
