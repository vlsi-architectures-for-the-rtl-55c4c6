// branch_metric_unit: modified branch metrics of a rate-1/2 code for one received symbol.
//
// For the code word c = (c0, c1), c_i in {-1, +1}, the metric is G' = y0*c0 + y1*c1, where the
// inputs are already scaled by 1/sigma^2. Terms common to all branches are dropped, which the
// shift invariance of MAX* allows. A punctured component contributes 0 (c_i = 0).
// Output index {c0,c1}: bit value 1 stands for +1. Purely combinational; one instance feeds
// each recursion unit, so the symbols, not the metrics, are what is stored.
module branch_metric_unit
  import map_pkg::*;
(
  input  sym_t    sym,
  output bm_vec_t bm
);

  bm_t t0, t1;

  always_comb begin
    t0 = sym.punct[0] ? '0 : BM_W'(sym.y0);
    t1 = sym.punct[1] ? '0 : BM_W'(sym.y1);
    for (int cw = 0; cw < 4; cw++)
      bm[cw] = (cw[1] ? t0 : -t0) + (cw[0] ? t1 : -t1);
  end

endmodule
