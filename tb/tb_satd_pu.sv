// Testbench for satd_pu: back-to-back random 4x4 blocks, one row per cycle,
// half of them with the residual subtracted.  The model computes the 2-D
// Hadamard transform as a matrix product H*D*H and the SATD (sum+1)>>1.
// Each result must appear exactly one cycle after the block's fourth row.
module tb_satd_pu;
  import me_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  logic in_valid = 0, in_first = 0, use_res = 0, out_valid;
  pix_t [3:0] cur, pred;
  res_t [3:0] res;
  logic [15:0] satd;
  int checks = 0, failures = 0;
  int exp_q[$];

  satd_pu dut (.clk, .rst_n, .in_valid, .in_first, .cur, .pred, .res, .use_res, .out_valid, .satd);

  localparam int H [4][4] = '{'{1,1,1,1}, '{1,1,-1,-1}, '{1,-1,-1,1}, '{1,-1,1,-1}};

  always @(posedge clk) if (rst_n) begin
    #1;
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        int e;
        e = exp_q.pop_front();
        if (int'(satd) != e) begin failures++; $display("satd %0d exp %0d", satd, e); end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 50; blk++) begin
      int d [4][4], t [4][4], s;
      bit ur;
      ur = blk[0];
      for (int r = 0; r < 4; r++) begin
        pix_t [3:0] c, p; res_t [3:0] u;
        for (int x = 0; x < 4; x++) begin
          c[x] = pix_t'($urandom); p[x] = pix_t'($urandom);
          u[x] = 9'($signed($urandom_range(0, 510)) - 255);
          d[r][x] = int'(c[x]) - int'(p[x]) - (ur ? int'(u[x]) : 0);
        end
        in_valid <= 1; in_first <= (r == 0); cur <= c; pred <= p; res <= u; use_res <= ur;
        @(posedge clk);
      end
      s = 0;
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        int v;
        v = 0;
        for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) v += H[i][a] * d[a][b] * H[b][j];
        s += (v < 0) ? -v : v;
      end
      exp_q.push_back((s + 1) >> 1);
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing outputs"); end
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
