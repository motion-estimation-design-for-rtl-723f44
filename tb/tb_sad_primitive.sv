// Testbench for sad_primitive: random current block, residual and per-cycle
// reference rows / part selections.  The expected SAD after each cycle is
// rebuilt from the input history: row k of the block taken k cycles after
// row 0, i.e. sum over k of |cur[k] - ref(t-3+k)| (and with the residual).
module tb_sad_primitive;
  import me_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  pix_t [3:0][3:0] cur;
  cres_t [3:0][3:0] cur_res;
  pix_t [3:0] ref_a, ref_b;
  logic [3:0] sel_b;
  logic [SAD4_W-1:0] sad, sad_res;

  sad_primitive dut (.clk, .cur, .cur_res, .ref_a, .ref_b, .sel_b, .sad, .sad_res);

  localparam int N = 200;
  pix_t ha [N][4]; pix_t hb [N][4]; logic [3:0] hs [N];
  int checks = 0, failures = 0;

  function automatic int rowsad(int t, int k, bit res);
    int s = 0;
    for (int c = 0; c < 4; c++) begin
      int r, v, d;
      r = hs[t][k] ? int'(hb[t][c]) : int'(ha[t][c]);
      v = res ? int'($signed(cur_res[k][c])) : int'(cur[k][c]);
      d = v - r;
      s += (d < 0) ? -d : d;
    end
    return s;
  endfunction

  initial begin
    for (int k = 0; k < 4; k++) for (int c = 0; c < 4; c++) begin
      cur[k][c] = pix_t'($urandom);
      cur_res[k][c] = 10'($signed({2'b0, cur[k][c]}) - ($signed($urandom_range(0, 400)) - 200));
    end
    for (int t = 0; t < N; t++) begin
      for (int c = 0; c < 4; c++) begin ha[t][c] = pix_t'($urandom); hb[t][c] = pix_t'($urandom); end
      hs[t] = 4'($urandom);
      ref_a <= {ha[t][3], ha[t][2], ha[t][1], ha[t][0]};
      ref_b <= {hb[t][3], hb[t][2], hb[t][1], hb[t][0]};
      sel_b <= hs[t];
      @(posedge clk);
      #1;
      if (t >= 3) begin
        int e, er;
        e = 0; er = 0;
        for (int k = 0; k < 4; k++) begin
          e  += rowsad(t - 3 + k, k, 0);
          er += rowsad(t - 3 + k, k, 1);
        end
        checks++;
        if (int'(sad) != e || int'(sad_res) != er) begin
          failures++;
          if (failures < 5) $display("t=%0d sad %0d/%0d exp %0d/%0d", t, sad, sad_res, e, er);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
