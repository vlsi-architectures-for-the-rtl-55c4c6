// tb_workload_allzero: the worst case for the state-metric dynamic range, run through all
// decoders of map_decoder_top at the default size (both streams of the decoder pair
// carry it). The all-zero information sequence
// is received with the highest reliability (y0 = y1 = -7.875 on every symbol), which drives the spread between
// the largest and smallest state metric to its bound of 47.25 (378 quanta) for the (7,5)
// code. Because the forward recursion starts from the stationary vector (47.25, 0, 15.75, 0),
// the spread of RU_A must equal 378 quanta at every step, with no transient above it; the
// backward units, started from the all-zero vector, must never exceed it either. Every
// decoded bit of every decoder must be 0, and every LLR must equal the value worked out here
// from the stationary forward vector and the converged backward vector (all decoders
// converge over L symbols, so they give the same value).
module tb_workload_allzero;
  import map_pkg::*;

  localparam int L    = 64;
  localparam int NOUT = 12 * L;
  localparam int DMAX = 378;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  ysoft_t y0 = '0, y1 = '0;
  logic [1:0] punct = '0;
  logic out_valid, bit_out, mab_valid, mab_bit, pair1_accept, pair0_valid, pair0_bit, pair1_valid, pair1_bit, nb3_valid, nb3_bit, pt_valid, pt_bit, na2_valid, na2_bit;
  logic signed [NSM-1:0] llr, mab_llr, pair0_llr, pair1_llr, nb3_llr, pt_llr, na2_llr;
  int n_out3 = 0, n_outp = 0, n_outa = 0, n_outm = 0, n_outq = 0;

  map_decoder_top dut (.clk, .rst_n, .in_valid, .y0, .y1, .punct,
                       .nb2_valid(out_valid), .nb2_llr(llr), .nb2_bit(bit_out),
                       .nb3_valid, .nb3_llr, .nb3_bit, .pt_valid, .pt_llr, .pt_bit,
                       .na2_valid, .na2_llr, .na2_bit, .mab_valid, .mab_llr, .mab_bit,
                       .pair1_y0(y0), .pair1_y1(y1), .pair1_punct(punct), .pair1_accept,
                       .pair0_valid, .pair0_llr, .pair0_bit, .pair1_valid, .pair1_llr, .pair1_bit);

  always #5 clk = ~clk;

  initial begin
    #(5_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // spread of a modulo vector, measured against its state-0 element
  function automatic int spread(sm_vec_t v);
    int lo = 0, hi = 0;
    for (int s = 1; s < NS; s++) begin
      int d = int'($signed(v[s] - v[0]));
      if (d < lo) lo = d;
      if (d > hi) hi = d;
    end
    return hi - lo;
  endfunction

  int max_a = 0, max_b1 = 0, max_b2 = 0, n_a_at_bound = 0, n_a_steps = 0, n_out = 0;
  int first_llr = 0;

  always @(posedge clk) if (rst_n && in_valid) begin
    if (dut.u_nb2.ctl.a_run) begin
      int d;
      d = spread(dut.u_nb2.a_cur);
      n_a_steps++;
      if (d > max_a) max_a = d;
      if (d == DMAX) n_a_at_bound++;
    end
    if (spread(dut.u_nb2.b1_seed) > max_b1) max_b1 = spread(dut.u_nb2.b1_seed);
    if (dut.u_nb2.ctl.llr_run && spread(dut.u_nb2.b2_cur) > max_b2) max_b2 = spread(dut.u_nb2.b2_cur);
  end

  int NXT [4][2] = '{'{0, 2}, '{2, 0}, '{3, 1}, '{1, 3}};
  int PAR [4][2] = '{'{0, 1}, '{0, 1}, '{1, 0}, '{1, 0}};

  function automatic int corr(int d);
    return (d < 32) ? int'($floor(8.0 * $ln(1.0 + $exp(-real'(d) / 8.0)) + 0.5)) : 0;
  endfunction
  function automatic int mstar(int x, int y);
    return ((x > y) ? x : y) + corr((x > y) ? x - y : y - x);
  endfunction
  // branch metric on the all-zero path at maximum reliability: each code bit 0 (-1) earns 63
  function automatic int gz(int s, int u);
    return ((u == 0) ? 63 : -63) + ((PAR[s][u] == 0) ? 63 : -63);
  endfunction

  // Expected LLR from the stationary forward vector (378, 0, 126, 0) and the backward vector
  // reached after L steps from zero, both computed here with integer arithmetic.
  function automatic int expected_llr();
    int B [4], Bn [4], A [4], lv [2][4];
    A = '{378, 0, 126, 0};
    B = '{0, 0, 0, 0};
    for (int i = 0; i < L; i++) begin
      for (int s = 0; s < 4; s++) Bn[s] = mstar(B[NXT[s][0]] + gz(s, 0), B[NXT[s][1]] + gz(s, 1));
      B = Bn;
    end
    for (int u = 0; u < 2; u++)
      for (int sp = 0; sp < 4; sp++) lv[u][sp] = A[sp] + gz(sp, u) + B[NXT[sp][u]];
    return mstar(mstar(lv[1][0], lv[1][1]), mstar(lv[1][2], lv[1][3]))
         - mstar(mstar(lv[0][0], lv[0][1]), mstar(lv[0][2], lv[0][3]));
  endfunction

  initial begin
    first_llr = expected_llr();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (n_out < NOUT) begin
      @(negedge clk);
      if (out_valid) begin
        checks++; if (bit_out != 1'b0) failures++;
        checks++; if (int'(llr) != first_llr) failures++;
        checks++; if (int'(llr) > -126) failures++;
        n_out++;
      end
      if (nb3_valid) begin
        checks++; if (nb3_bit != 1'b0) failures++;
        checks++; if (int'(nb3_llr) != first_llr) failures++;
        n_out3++;
      end
      if (pt_valid) begin
        checks++; if (pt_bit != 1'b0) failures++;
        checks++; if (int'(pt_llr) != first_llr) failures++;
        n_outp++;
      end
      if (pair0_valid) begin
        checks++; if (pair0_bit != 1'b0 || int'(pair0_llr) != first_llr) failures++;
      end
      if (pair1_valid) begin
        checks++; if (pair1_bit != 1'b0 || int'(pair1_llr) != first_llr) failures++;
        n_outq++;
      end
      if (mab_valid) begin
        checks++; if (mab_bit != 1'b0) failures++;
        checks++; if (int'(mab_llr) != first_llr) failures++;
        n_outm++;
      end
      if (na2_valid) begin
        checks++; if (na2_bit != 1'b0) failures++;
        checks++; if (int'(na2_llr) != first_llr) failures++;
        n_outa++;
      end
      in_valid = 1'b1;
      y0 = -ysoft_t'(63);
      y1 = -ysoft_t'(63);
    end
    checks++; if (n_out3 < NOUT || n_outp < NOUT || n_outa < NOUT || n_outm < NOUT || n_outq < NOUT - L) begin failures++; $display("too few outputs from the other decoders"); end
    checks++; if (max_a != DMAX) begin failures++; $display("forward spread max %0d", max_a); end
    checks++; if (n_a_at_bound != n_a_steps) begin failures++; $display("forward spread off the bound %0d of %0d steps", n_a_steps - n_a_at_bound, n_a_steps); end
    checks++; if (max_b1 > DMAX || max_b2 > DMAX) begin failures++; $display("backward spread %0d %0d", max_b1, max_b2); end
    $display("llr=%0d forward spread %0d (%0d steps), backward spreads %0d %0d", first_llr, max_a, n_a_steps, max_b1, max_b2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
