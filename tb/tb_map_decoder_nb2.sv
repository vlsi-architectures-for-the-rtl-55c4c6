// tb_map_decoder_nb2: end-to-end test of the (n_A = 1, n_B = 2, M_A) decoder at its default
// size (L = 64, no parameter overrides).
//
// A random information stream is encoded with the (7,5) recursive systematic code (transition
// table written out below, independently of the RTL's trellis functions), sent through an
// additive noise channel at several signal-to-noise ratios, quantised to 7-bit soft values
// and streamed into the decoder, with random stalls and, in some blocks, punctured parity.
// An integer reference model runs the same schedule (continuous forward recursion from the
// initial vector, backward convergence over the next block from the all-zero vector, exact
// MAX* with the rounded correction term, the same pairing of the LLR trees) with unbounded
// integers, so every LLR must match bit for bit. It also checks the decoding latency of 4L
// enabled cycles, the hard decisions at high SNR, and that stalls, segment changes, both
// directions of the reversal memories, seed hand-over, puncturing and modulo wrap-around of
// the state metrics all occurred.
module tb_map_decoder_nb2;
  import map_pkg::*;

  localparam int L      = 64;
  localparam int NBLK   = 28;                 // blocks streamed in
  localparam int NSYM   = NBLK * L;
  localparam int NOUT   = (NBLK - 1) * L;     // outputs whose convergence block exists
  localparam int LAT    = 4 * L;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  ysoft_t y0 = '0, y1 = '0;
  logic [1:0] punct = '0;
  logic out_valid, bit_out;
  logic signed [NSM-1:0] llr;

  map_decoder_nb2 dut (.clk, .rst_n, .in_valid, .y0, .y1, .punct, .out_valid, .llr, .bit_out);

  always #5 clk = ~clk;

  initial begin
    #(5_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Fig. 1 trellis: state {r1,r2}, next state and parity bit per input
  int NXT [4][2] = '{'{0, 2}, '{2, 0}, '{3, 1}, '{1, 3}};
  int PAR [4][2] = '{'{0, 1}, '{0, 1}, '{1, 0}, '{1, 0}};

  int info [NSYM];
  int ry0 [NSYM], ry1 [NSYM], rp [NSYM];
  int refllr [NSYM];
  int A [NSYM+1][4];

  function automatic int lutv(int d);
    if (d >= 32) return 0;
    return int'($floor(8.0 * $ln(1.0 + $exp(-real'(d) / 8.0)) + 0.5));
  endfunction

  function automatic int mstar(int x, int y);
    int d = (x > y) ? x - y : y - x;
    return ((x > y) ? x : y) + lutv(d);
  endfunction

  function automatic int gm(int k, int s, int u);
    int g = 0;
    if (rp[k][0] == 0) g += u ? ry0[k] : -ry0[k];
    if (rp[k][1] == 0) g += PAR[s][u] ? ry1[k] : -ry1[k];
    return g;
  endfunction

  function automatic real gauss();
    real acc = 0.0;
    for (int i = 0; i < 12; i++) acc += real'($urandom_range(0, 1_000_000)) / 1_000_000.0;
    return acc - 6.0;
  endfunction

  function automatic int quant(real v);
    int q = int'($floor(v * 8.0 + 0.5));
    if (q > 63) q = 63;
    if (q < -63) q = -63;
    return q;
  endfunction

  // reference decoder
  task automatic build_reference();
    int B [4], Bn [4], c [4][2], nc [4], lv [2][4];
    for (int s = 0; s < 4; s++) A[0][s] = 0;
    A[0][0] = 378; A[0][2] = 126;
    for (int k = 0; k < NSYM; k++) begin
      for (int s = 0; s < 4; s++) nc[s] = 0;
      for (int p = 0; p < 4; p++)
        for (int u = 0; u < 2; u++) begin
          c[NXT[p][u]][nc[NXT[p][u]]] = A[k][p] + gm(k, p, u);
          nc[NXT[p][u]]++;
        end
      for (int s = 0; s < 4; s++) A[k+1][s] = mstar(c[s][0], c[s][1]);
    end
    for (int b = 0; b + 1 < NBLK; b++) begin
      for (int s = 0; s < 4; s++) B[s] = 0;
      for (int k = (b + 2) * L - 1; k >= (b + 1) * L; k--) begin
        for (int s = 0; s < 4; s++)
          Bn[s] = mstar(B[NXT[s][0]] + gm(k, s, 0), B[NXT[s][1]] + gm(k, s, 1));
        B = Bn;
      end
      for (int k = (b + 1) * L - 1; k >= b * L; k--) begin
        for (int u = 0; u < 2; u++)
          for (int sp = 0; sp < 4; sp++) lv[u][sp] = A[k][sp] + gm(k, sp, u) + B[NXT[sp][u]];
        refllr[k] = mstar(mstar(lv[1][0], lv[1][1]), mstar(lv[1][2], lv[1][3]))
                  - mstar(mstar(lv[0][0], lv[0][1]), mstar(lv[0][2], lv[0][3]));
        for (int s = 0; s < 4; s++)
          Bn[s] = mstar(B[NXT[s][0]] + gm(k, s, 0), B[NXT[s][1]] + gm(k, s, 1));
        B = Bn;
      end
    end
  endtask

  // stimulus: blocks 0-7 high SNR, 8-15 low SNR, 16-21 punctured parity, rest medium
  task automatic build_stimulus();
    int s = 0;
    real amp, sigma;
    for (int k = 0; k < NSYM; k++) begin
      int b = k / L;
      int c1;
      info[k] = $urandom_range(0, 1);
      c1 = PAR[s][info[k]];
      s  = NXT[s][info[k]];
      if (b < 8)       begin amp = 2.0; sigma = 0.3; end
      else if (b < 16) begin amp = 2.0; sigma = 2.5; end
      else             begin amp = 3.0; sigma = 1.0; end
      ry0[k] = quant((info[k] ? amp : -amp) + sigma * gauss());
      ry1[k] = quant((c1 ? amp : -amp) + sigma * gauss());
      rp[k]  = (b >= 16 && b < 22 && (k % 2 == 1)) ? 2 : 0;
    end
  endtask

  int en_idx = 0;
  always @(posedge clk) if (rst_n && in_valid) en_idx <= en_idx + 1;

  // mechanism counters
  int n_stall = 0, n_seg = 0, n_dir_up = 0, n_dir_dn = 0, n_seed = 0, n_punct = 0, n_wrap = 0;
  int n_lat_ok = 0, n_bit_err_hi = 0;
  sm_t last_a0 = '0;

  always @(posedge clk) if (rst_n && in_valid) begin
    if (dut.ctl.seg_start) begin
      n_seg++;
      if (dut.u_ctl.dir) n_dir_dn++; else n_dir_up++;
      if (dut.ctl.llr_run) n_seed++;
    end
    if (dut.ctl.a_run && !dut.ctl.a_load) begin
      if (last_a0 > sm_t'(3000) && dut.a_cur[0] < sm_t'(1000)) n_wrap++;
      last_a0 <= dut.a_cur[0];
    end
  end

  int k_out = 0;

  initial begin
    int k = 0;
    build_stimulus();
    build_reference();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (k_out < NOUT) begin
      @(negedge clk);
      // outputs produced by the last edge
      if (out_valid) begin
        checks++;
        if (int'(llr) != refllr[k_out]) begin
          failures++;
          if (failures < 10) $display("llr mismatch k=%0d dut=%0d ref=%0d", k_out, llr, refllr[k_out]);
        end
        checks++;
        if (en_idx - 1 - k_out != LAT) begin
          failures++;
          if (failures < 10) $display("latency k=%0d got %0d", k_out, en_idx - 1 - k_out);
        end else n_lat_ok++;
        checks++;
        if (bit_out != (refllr[k_out] > 0)) failures++;
        if (k_out < 8 * L && bit_out != info[k_out][0]) n_bit_err_hi++;
        k_out++;
      end
      // next input: stall about one cycle in eight in blocks 4-11
      if (k < NSYM) begin
        if ((k / L) >= 4 && (k / L) < 12 && $urandom_range(0, 7) == 0) begin
          in_valid = 1'b0;
          n_stall++;
        end else begin
          in_valid = 1'b1;
          y0 = ysoft_t'(ry0[k]);
          y1 = ysoft_t'(ry1[k]);
          punct = rp[k][1:0];
          if (rp[k] != 0) n_punct++;
          k++;
        end
      end else begin
        in_valid = 1'b1;            // drain with zero symbols
        y0 = '0; y1 = '0; punct = '0;
      end
    end
    checks++; if (n_bit_err_hi != 0) begin failures++; $display("bit errors at high SNR: %0d", n_bit_err_hi); end
    checks++; if (n_stall == 0) begin failures++; $display("no stall"); end
    checks++; if (n_seg < NBLK) begin failures++; $display("too few segments"); end
    checks++; if (n_dir_up == 0 || n_dir_dn == 0) begin failures++; $display("reversal memory used one direction only"); end
    checks++; if (n_seed == 0) begin failures++; $display("no seed hand-over"); end
    checks++; if (n_punct == 0) begin failures++; $display("no punctured symbol"); end
    checks++; if (n_wrap == 0) begin failures++; $display("no metric wrap-around"); end
    $display("outputs=%0d stalls=%0d segments=%0d up=%0d down=%0d seeds=%0d punct=%0d wraps=%0d latency_ok=%0d",
             k_out, n_stall, n_seg, n_dir_up, n_dir_dn, n_seed, n_punct, n_wrap, n_lat_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
