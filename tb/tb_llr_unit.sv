// tb_llr_unit: random test of the soft-output unit against an integer model of
// L = MAX*(u=1 branch sums) - MAX*(u=0 branch sums) over the (7,5) trellis written out here,
// with the trees pairing s' = (0,1) and (2,3). Forward and backward vectors are drawn around
// random (wrapping) bases; the result must match exactly as a signed NSM-bit number.
module tb_llr_unit;
  import map_pkg::*;
  int checks = 0, failures = 0;
  sm_vec_t a, b;
  bm_vec_t bm;
  logic signed [NSM-1:0] llr;

  llr_unit dut (.a, .b, .bm, .llr);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int NXT [4][2] = '{'{0, 2}, '{2, 0}, '{3, 1}, '{1, 3}};
  int PAR [4][2] = '{'{0, 1}, '{0, 1}, '{1, 0}, '{1, 0}};

  function automatic int corr(int d);
    return (d < 32) ? int'($floor(8.0 * $ln(1.0 + $exp(-real'(d) / 8.0)) + 0.5)) : 0;
  endfunction
  function automatic int mstar(int x, int y);
    return ((x > y) ? x : y) + corr((x > y) ? x - y : y - x);
  endfunction

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int ta [4], tb [4], g [4], lv [2][4], e, ba, bb, spread;
      ba = $urandom_range(0, 100000);
      bb = $urandom_range(0, 100000);
      spread = (i % 3 == 0) ? 20 : 380;
      for (int s = 0; s < 4; s++) begin
        ta[s] = ba + $urandom_range(0, spread);
        tb[s] = bb + $urandom_range(0, spread);
        a[s] = NSM'(ta[s]);
        b[s] = NSM'(tb[s]);
      end
      for (int w = 0; w < 4; w++) begin g[w] = $urandom_range(0, 252) - 126; bm[w] = bm_t'(g[w]); end
      #1;
      for (int u = 0; u < 2; u++)
        for (int sp = 0; sp < 4; sp++) lv[u][sp] = ta[sp] + g[u * 2 + PAR[sp][u]] + tb[NXT[sp][u]];
      e = mstar(mstar(lv[1][0], lv[1][1]), mstar(lv[1][2], lv[1][3]))
        - mstar(mstar(lv[0][0], lv[0][1]), mstar(lv[0][2], lv[0][3]));
      checks++;
      if (int'(llr) != e) begin
        failures++;
        if (failures < 10) $display("got %0d exp %0d", llr, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
