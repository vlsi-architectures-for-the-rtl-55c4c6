// tb_branch_metric_unit: exhaustive test of the branch metrics over all pairs of 7-bit soft
// inputs and all puncturing patterns: G'(c0,c1) = c0*y0 + c1*y1 with c = -1/+1, and a
// punctured component contributing 0.
module tb_branch_metric_unit;
  import map_pkg::*;
  int checks = 0, failures = 0;
  sym_t sym;
  bm_vec_t bm;

  branch_metric_unit dut (.sym, .bm);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -63; a <= 63; a++)
      for (int b = -63; b <= 63; b++)
        for (int p = 0; p < 4; p++) begin
          sym.y0 = ysoft_t'(a);
          sym.y1 = ysoft_t'(b);
          sym.punct = 2'(p);
          #1;
          for (int c0 = 0; c0 < 2; c0++)
            for (int c1 = 0; c1 < 2; c1++) begin
              int e;
              e = (p[0] ? 0 : (c0 ? a : -a)) + (p[1] ? 0 : (c1 ? b : -b));
              checks++;
              if (int'(bm[c0*2+c1]) != e) begin
                failures++;
                if (failures < 10) $display("y=(%0d,%0d) p=%0d cw=%0d%0d got %0d exp %0d", a, b, p, c0, c1, bm[c0*2+c1], e);
              end
            end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
