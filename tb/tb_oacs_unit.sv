// tb_oacs_unit: random test of the Offset-Add-Compare-Select element. Each step draws the
// two predecessors' split metrics (m, offset) and branch metrics; after the clock edge the
// element must hold m = the larger of (m_i + o_i + g_i) and o = the MAX* correction of their
// difference, so that m + o equals the add-MAX* result computed here. With en = 0 the
// registers must hold; reset must clear them.
module tb_oacs_unit;
  import map_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  sm_t m0, m1, m;
  ofs_t o0, o1, o;
  bm_t g0, g1;

  oacs_unit dut (.clk, .rst_n, .en, .m0, .o0, .g0, .m1, .o1, .g1, .m, .o);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int corr(int d);
    return (d < 32) ? int'($floor(8.0 * $ln(1.0 + $exp(-real'(d) / 8.0)) + 0.5)) : 0;
  endfunction

  initial begin
    sm_t hold_m; ofs_t hold_o;
    m0 = '0; m1 = '0; o0 = '0; o1 = '0; g0 = '0; g1 = '0;
    @(negedge clk);
    checks++; if (m != '0 || o != '0) failures++;
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      int base, t0, t1, s0, s1, e_m, e_full;
      base = $urandom_range(0, 50000);
      t0 = base + $urandom_range(0, 400) - 200;
      t1 = base + $urandom_range(0, 400) - 200;
      o0 = ofs_t'($urandom_range(0, 6));
      o1 = ofs_t'($urandom_range(0, 6));
      g0 = bm_t'($urandom_range(0, 252) - 126);
      g1 = bm_t'($urandom_range(0, 252) - 126);
      m0 = NSM'(t0);
      m1 = NSM'(t1);
      en = ($urandom_range(0, 9) != 0);
      hold_m = m; hold_o = o;
      s0 = t0 + int'(o0) + int'(g0);
      s1 = t1 + int'(o1) + int'(g1);
      e_m = (s0 >= s1) ? s0 : s1;
      e_full = e_m + corr((s0 > s1) ? s0 - s1 : s1 - s0);
      @(negedge clk);
      if (en) begin
        checks++;
        if (m != NSM'(e_m) || NSM'(int'(m) + int'(o)) != NSM'(e_full)) begin
          failures++;
          if (failures < 10) $display("s0=%0d s1=%0d got m=%0d o=%0d", s0, s1, m, o);
        end
      end else begin
        checks++;
        if (m != hold_m || o != hold_o) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
