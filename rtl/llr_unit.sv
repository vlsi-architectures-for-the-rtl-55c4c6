// llr_unit: soft output L(u_k) of one trellis step.
//
// L(u_k) = MAX*_{branches with u=1}(A_k(s') + G_k(s',s) + B_{k+1}(s))
//        - MAX*_{branches with u=0}(A_k(s') + G_k(s',s) + B_{k+1}(s)).
// A first stage of 2^(NU+2) adders forms the 2^(NU+1) branch sums, two binary trees of
// 2^NU - 1 two-operand MAX* operators reduce the sums of each input value (leaves in
// increasing order of s'), and a subtractor gives the LLR. Sums and MAX* use modulo-2^NSM
// arithmetic; the final difference is read as a signed NSM-bit value in quanta of 0.125.
// Positive means u = 1 (code bit +1). Purely combinational.
module llr_unit
  import map_pkg::*;
(
  input  sm_vec_t a,        // A_k
  input  sm_vec_t b,        // B_{k+1}
  input  bm_vec_t bm,       // G_k by code word {c0,c1}
  output logic signed [NSM-1:0] llr
);

  // One binary tree per input value u. Level 0 holds the NS branch sums (leaf sp = branch
  // leaving s' = sp with input u); level NU holds the single root.
  for (genvar u = 0; u < 2; u++) begin : g_tree
    for (genvar lev = 0; lev <= NU; lev++) begin : g_lev
      sm_t v [1 << (NU - lev)];
      if (lev == 0) begin : g_sums
        for (genvar sp = 0; sp < NS; sp++) begin : g_sum
          assign v[sp] = a[sp] + NSM'(bm[branch_cw(sp, u)]) + b[next_state(sp, u)];
        end
      end else begin : g_ops
        for (genvar n = 0; n < (1 << (NU - lev)); n++) begin : g_op
          maxstar u_ms (.x(g_lev[lev-1].v[2*n]), .y(g_lev[lev-1].v[2*n+1]), .z(v[n]));
        end
      end
    end
  end

  assign llr = g_tree[1].g_lev[NU].v[0] - g_tree[0].g_lev[NU].v[0];

endmodule
