// map_ref_pkg: integer reference model of the sliding-window log-MAP decoders, for the
// testbenches. The (7,5) trellis is written out as tables (state {r1,r2}); metrics are
// unbounded integers in quanta of 0.125, and the MAX* correction is computed in floating
// point and rounded to the nearest quantum. Nothing here is shared with the RTL.
package map_ref_pkg;

  int NXT [4][2] = '{'{0, 2}, '{2, 0}, '{3, 1}, '{1, 3}};
  int PAR [4][2] = '{'{0, 1}, '{0, 1}, '{1, 0}, '{1, 0}};

  function automatic int lutv(int d);
    if (d >= 32) return 0;
    return int'($floor(8.0 * $ln(1.0 + $exp(-real'(d) / 8.0)) + 0.5));
  endfunction

  function automatic int mstar(int x, int y);
    return ((x > y) ? x : y) + lutv((x > y) ? x - y : y - x);
  endfunction

  // branch metric of the branch leaving s with input u, for one symbol
  function automatic int gm(int y0, int y1, int p, int s, int u);
    int g = 0;
    if (p[0] == 0) g += u ? y0 : -y0;
    if (p[1] == 0) g += PAR[s][u] ? y1 : -y1;
    return g;
  endfunction

  // Encode info bits with the (7,5) code, send +/-amp with Gaussian-like noise of the given
  // deviation, quantise to 7 bits (3 fraction bits, saturating).
  function automatic int quant(real v);
    int q = int'($floor(v * 8.0 + 0.5));
    if (q > 63) q = 63;
    if (q < -63) q = -63;
    return q;
  endfunction

  function automatic real gauss();
    real acc = 0.0;
    for (int i = 0; i < 12; i++) acc += real'($urandom_range(0, 1_000_000)) / 1_000_000.0;
    return acc - 6.0;
  endfunction

  // Reference LLRs of a sliding-window decoder: the stream is cut into windows of WIN symbols;
  // the backward metrics of window b start from the all-zero vector LCONV symbols after the
  // window's end and run down through it; the forward recursion is continuous from the
  // stationary vector (378, 0, 126, 0). LLR trees pair s' = (0,1) and (2,3). Entries whose
  // convergence run would pass the end of the stream are left at 0.
  task automatic reference(input int ry0 [], input int ry1 [], input int rp [],
                           input int win, input int lconv, ref int llr []);
    int n = ry0.size();
    int A [][4];
    int B [4], Bn [4], c [4][2], nc [4], lv [2][4];
    A = new[n + 1];
    llr = new[n];
    A[0] = '{378, 0, 126, 0};
    for (int k = 0; k < n; k++) begin
      for (int s = 0; s < 4; s++) nc[s] = 0;
      for (int p = 0; p < 4; p++)
        for (int u = 0; u < 2; u++) begin
          c[NXT[p][u]][nc[NXT[p][u]]] = A[k][p] + gm(ry0[k], ry1[k], rp[k], p, u);
          nc[NXT[p][u]]++;
        end
      for (int s = 0; s < 4; s++) A[k+1][s] = mstar(c[s][0], c[s][1]);
    end
    for (int b = 0; (b + 1) * win + lconv <= n; b++) begin
      B = '{0, 0, 0, 0};
      for (int k = (b + 1) * win + lconv - 1; k >= b * win; k--) begin
        if (k < (b + 1) * win) begin
          for (int u = 0; u < 2; u++)
            for (int sp = 0; sp < 4; sp++)
              lv[u][sp] = A[k][sp] + gm(ry0[k], ry1[k], rp[k], sp, u) + B[NXT[sp][u]];
          llr[k] = mstar(mstar(lv[1][0], lv[1][1]), mstar(lv[1][2], lv[1][3]))
                 - mstar(mstar(lv[0][0], lv[0][1]), mstar(lv[0][2], lv[0][3]));
        end
        for (int s = 0; s < 4; s++)
          Bn[s] = mstar(B[NXT[s][0]] + gm(ry0[k], ry1[k], rp[k], s, 0),
                        B[NXT[s][1]] + gm(ry0[k], ry1[k], rp[k], s, 1));
        B = Bn;
      end
    end
  endtask

endpackage
