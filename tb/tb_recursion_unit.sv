// tb_recursion_unit: forward and backward recursion units.
// 1) Forward unit started from the all-zero vector on the all-zero path received with the
//    highest reliability (y0 = y1 = -7.875) must reproduce, step by step, the state metrics
//    of the published eight-step table (0.75, 16.875, 33.125 ... in quanta of 0.125).
// 2) Both units are run on random branch metrics against an integer model built from the
//    (7,5) transition table written out here, with random reloads, stalls (en = 0) and
//    wrap-around of the modulo metrics; sm_cur and sm_reg are both checked.
module tb_recursion_unit;
  import map_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, load = 0;
  sm_vec_t init, fa_cur, fa_reg, bw_cur, bw_reg;
  bm_vec_t bm;

  recursion_unit #(.FORWARD(1'b1)) dut_f (.clk, .rst_n, .en, .load, .init, .bm, .sm_cur(fa_cur), .sm_reg(fa_reg), .dec(), .ofs());
  recursion_unit #(.FORWARD(1'b0)) dut_b (.clk, .rst_n, .en, .load, .init, .bm, .sm_cur(bw_cur), .sm_reg(bw_reg), .dec(), .ofs());

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int NXT [4][2] = '{'{0, 2}, '{2, 0}, '{3, 1}, '{1, 3}};
  int PAR [4][2] = '{'{0, 1}, '{0, 1}, '{1, 0}, '{1, 0}};

  // published table, quanta of 0.125, t = 1..8
  int TAB [4][8] = '{
    '{126, 252, 378, 504, 630, 756, 882, 1008},
    '{  6, 126, 135, 252, 265, 384, 504,  630},
    '{126, 132, 252, 263, 384, 504, 630,  756},
    '{  6, 126, 135, 252, 265, 384, 504,  630}};

  function automatic int corr(int d);
    return (d < 32) ? int'($floor(8.0 * $ln(1.0 + $exp(-real'(d) / 8.0)) + 0.5)) : 0;
  endfunction
  function automatic int mstar(int x, int y);
    return ((x > y) ? x : y) + corr((x > y) ? x - y : y - x);
  endfunction

  int fa [4], bw [4], fr [4], br [4], nf [4], nb [4], c [4][2], nc [4], g [4];

  task automatic check_vec(string what, sm_vec_t v, int r [4]);
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (v[s] != NSM'(r[s])) begin
        failures++;
        if (failures < 10) $display("%s state %0d got %0d exp %0d", what, s, v[s], NSM'(r[s]));
      end
    end
  endtask

  initial begin
    for (int s = 0; s < 4; s++) init[s] = '0;
    for (int w = 0; w < 4; w++) bm[w] = '0;
    @(negedge clk);
    rst_n = 1;
    // --- part 1: published table
    for (int w = 0; w < 4; w++)
      bm[w] = bm_t'(((w >> 1) ? -63 : 63) + ((w & 1) ? -63 : 63));
    en = 1; load = 1;
    for (int t = 0; t < 8; t++) begin
      @(negedge clk);
      load = 0;
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (fa_reg[s] != NSM'(TAB[s][t])) begin
          failures++;
          $display("table t=%0d state %0d got %0d exp %0d", t + 1, s, fa_reg[s], TAB[s][t]);
        end
      end
    end
    // --- part 2: random against the model (the first step loads)
    for (int s = 0; s < 4; s++) begin fr[s] = int'(fa_reg[s]); br[s] = int'(bw_reg[s]); end
    for (int i = 0; i < 4000; i++) begin
      load = (i == 0) || ($urandom_range(0, 99) == 0);
      en   = ($urandom_range(0, 7) != 0);
      if (load) begin
        int base = $urandom_range(0, 4095);
        for (int s = 0; s < 4; s++) init[s] = NSM'(base + $urandom_range(0, 300));
        for (int s = 0; s < 4; s++) begin fa[s] = int'(init[s]); bw[s] = int'(init[s]); end
      end else begin
        fa = fr;
        bw = br;
      end
      for (int w = 0; w < 4; w++) begin g[w] = $urandom_range(0, 252) - 126; bm[w] = bm_t'(g[w]); end
      #1;
      check_vec("fwd cur", fa_cur, fa);
      check_vec("bwd cur", bw_cur, bw);
      for (int s = 0; s < 4; s++) nc[s] = 0;
      for (int p = 0; p < 4; p++)
        for (int u = 0; u < 2; u++) begin
          c[NXT[p][u]][nc[NXT[p][u]]] = fa[p] + g[u * 2 + PAR[p][u]];
          nc[NXT[p][u]]++;
        end
      for (int s = 0; s < 4; s++) begin
        nf[s] = mstar(c[s][0], c[s][1]);
        nb[s] = mstar(bw[NXT[s][0]] + g[PAR[s][0]], bw[NXT[s][1]] + g[2 + PAR[s][1]]);
      end
      @(negedge clk);
      if (en) begin fr = nf; br = nb; end
      check_vec("fwd reg", fa_reg, fr);
      check_vec("bwd reg", bw_reg, br);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
