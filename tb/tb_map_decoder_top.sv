// tb_map_decoder_top: end-to-end test of all decoders of map_decoder_top at the default
// size (L = 64, no parameter overrides), on one shared input stream.
//
// A random information stream is encoded with the (7,5) code, sent at three noise levels,
// quantised to 7-bit soft values and streamed in with random stalls and, in some blocks,
// punctured parity. The integer reference of map_ref_pkg gives the expected LLRs of each
// schedule (windows of L for the (1,2), (A+B)/2 and its pair, pointer and (2,2) decoders, L/2 for the (1,3)
// decoder, convergence length L for all). Each output group is checked bit for bit, for its
// latency (4L, or 3L for the (1,3) decoder, in enabled cycles) and for error-free hard decisions at high SNR. The test
// also counts, and requires, each mechanism of the five schedules: stalls, segment changes,
// both directions of every reversal memory, the seed hand-over from RU_B1 to RU_B2, restarts
// and B-vector generation by each of the three backward units of the (1,3) decoder, pointer
// saves into each pointer register, RU_B3 restarts and direct RU_B2 writes of the pointer
// decoder, LLRs from both forward units of the (2,2) decoder, both LLR units of the
// (A+B)/2 decoder working together, memory accesses shared by the decoder pair (whose
// second stream repeats the first, half a segment later), puncturing and modulo
// wrap-around of the forward metrics.
module tb_map_decoder_top;
  import map_pkg::*;
  import map_ref_pkg::*;

  localparam int L    = 64;
  localparam int H    = L / 2;
  localparam int NSYM = 28 * L;
  localparam int NOUT2 = NSYM - L;
  localparam int NOUT3 = NSYM - L - H;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  ysoft_t y0 = '0, y1 = '0;
  logic [1:0] punct = '0;
  logic nb2_valid, nb2_bit, mab_valid, mab_bit, pair1_accept, pair0_valid, pair0_bit, pair1_valid, pair1_bit, nb3_valid, nb3_bit, pt_valid, pt_bit, na2_valid, na2_bit;
  logic signed [NSM-1:0] nb2_llr, mab_llr, pair0_llr, pair1_llr;
  ysoft_t pair1_y0 = '0, pair1_y1 = '0;
  logic [1:0] pair1_punct = '0;
  logic signed [NSM-1:0] nb3_llr, pt_llr, na2_llr;

  map_decoder_top dut (.clk, .rst_n, .in_valid, .y0, .y1, .punct,
                       .nb2_valid, .nb2_llr, .nb2_bit, .nb3_valid, .nb3_llr, .nb3_bit,
                       .pt_valid, .pt_llr, .pt_bit, .mab_valid, .mab_llr, .mab_bit,
                       .pair1_y0, .pair1_y1, .pair1_punct, .pair1_accept, .pair0_valid, .pair0_llr,
                       .pair0_bit, .pair1_valid, .pair1_llr, .pair1_bit, .na2_valid, .na2_llr, .na2_bit);

  always #5 clk = ~clk;

  initial begin
    #(5_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int info [], ry0 [], ry1 [], rp [], ref2 [], ref3 [];

  int en_idx = 0;
  always @(posedge clk) if (rst_n && in_valid) en_idx <= en_idx + 1;

  // mechanism counters
  int n_stall = 0, n_seg2 = 0, n_up2 = 0, n_dn2 = 0, n_seed = 0, n_up3 = 0, n_dn3 = 0;
  int n_punct = 0, n_wrap2 = 0, n_wrap3 = 0;
  int n_load3 [3] = '{0, 0, 0};
  int n_gen3 [3]  = '{0, 0, 0};
  int n_ptr [3]   = '{0, 0, 0};
  int n_b3 = 0, n_b2w = 0, n_upp = 0, n_dnp = 0, n_fa1 = 0, n_fa2 = 0, n_dual = 0, n_share = 0;
  sm_t last2 = '0, last3 = '0;

  always @(posedge clk) if (rst_n && in_valid) begin
    if (dut.u_nb2.ctl.seg_start) begin
      n_seg2++;
      if (dut.u_nb2.u_ctl.dir) n_dn2++; else n_up2++;
      if (dut.u_nb2.ctl.llr_run) n_seed++;
    end
    if (dut.u_nb3.ctl.seg_start) begin
      if (dut.u_nb3.u_ctl.dir) n_dn3++; else n_up3++;
      if (dut.u_nb3.ctl.bmem_we) n_gen3[dut.u_nb3.ctl.gen_unit]++;
    end
    for (int u = 0; u < 3; u++) if (dut.u_nb3.ctl.b_load[u]) n_load3[u]++;
    if (dut.u_pt.ctl.bmem_we && dut.u_pt.ctl.bmem_addr == 16'd0) begin
      if (dut.u_pt.u_ctl.qdir) n_dnp++; else n_upp++;
    end
    if (dut.u_pt.ctl.seed_we) n_ptr[dut.u_pt.ctl.seed_slot]++;
    if (dut.u_pt.ctl.b3_load) n_b3++;
    if (dut.u_pt.ctl.bmem_we && !dut.u_pt.ctl.b3_gen) n_b2w++;
    if (dut.u_mab.llr_we) n_dual++;
    if (dut.u_pair.mem_en && dut.u_pair.ctl[0].a1_run && dut.u_pair.ctl[1].a1_run) n_share++;
    if (dut.u_na2.ctl.a2_run) begin
      if (dut.u_na2.ctl.upper) n_fa1++; else n_fa2++;
    end
    if (dut.u_nb2.ctl.a_run && !dut.u_nb2.ctl.a_load) begin
      if (last2 > sm_t'(3000) && dut.u_nb2.a_cur[0] < sm_t'(1000)) n_wrap2++;
      last2 <= dut.u_nb2.a_cur[0];
    end
    if (dut.u_nb3.ctl.a_run && !dut.u_nb3.ctl.a_load) begin
      if (last3 > sm_t'(3000) && dut.u_nb3.a_cur[0] < sm_t'(1000)) n_wrap3++;
      last3 <= dut.u_nb3.a_cur[0];
    end
  end

  task automatic check_out(string nm, logic signed [NSM-1:0] v, logic hb, int rf [], int lat,
                           ref int k, ref int errs_hi);
    checks++;
    if (int'(v) != rf[k]) begin
      failures++;
      if (failures < 10) $display("%s llr mismatch k=%0d dut=%0d ref=%0d", nm, k, v, rf[k]);
    end
    checks++;
    if (en_idx - 1 - k != lat) begin
      failures++;
      if (failures < 10) $display("%s latency k=%0d got %0d", nm, k, en_idx - 1 - k);
    end
    checks++;
    if (hb != (rf[k] > 0)) failures++;
    if (k < 8 * L && hb != info[k][0]) errs_hi++;
    k++;
  endtask

  initial begin
    int k, k1, k2, k3, kp, ka, km, kq0, kq1, s, e2, e3, ep, ea, em, eq0, eq1;
    real amp, sigma;
    info = new[NSYM]; ry0 = new[NSYM]; ry1 = new[NSYM]; rp = new[NSYM];
    s = 0;
    for (int i = 0; i < NSYM; i++) begin
      int b;
      b = i / L;
      info[i] = $urandom_range(0, 1);
      if (b < 8)       begin amp = 2.0; sigma = 0.3; end
      else if (b < 16) begin amp = 2.0; sigma = 2.5; end
      else             begin amp = 3.0; sigma = 1.0; end
      ry0[i] = quant((info[i] ? amp : -amp) + sigma * gauss());
      ry1[i] = quant((PAR[s][info[i]] ? amp : -amp) + sigma * gauss());
      s = NXT[s][info[i]];
      rp[i] = (b >= 16 && b < 22 && (i % 2 == 1)) ? 2 : 0;
    end
    reference(ry0, ry1, rp, L, L, ref2);
    reference(ry0, ry1, rp, H, L, ref3);
    k = 0; k2 = 0; k3 = 0; kp = 0; ka = 0; km = 0; em = 0; k1 = 0; kq0 = 0; kq1 = 0; eq0 = 0; eq1 = 0; e2 = 0; e3 = 0; ep = 0; ea = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (k2 < NOUT2 || k3 < NOUT3 || kp < NOUT2 || ka < NOUT2 || km < NOUT2 || kq0 < NOUT2 || kq1 < NOUT2) begin
      @(negedge clk);
      if (nb2_valid && k2 < NOUT2) check_out("nb2", nb2_llr, nb2_bit, ref2, 4 * L, k2, e2);
      if (nb3_valid && k3 < NOUT3) check_out("nb3", nb3_llr, nb3_bit, ref3, 3 * L, k3, e3);
      if (pt_valid && kp < NOUT2) check_out("pt", pt_llr, pt_bit, ref2, 4 * L, kp, ep);
      if (pair0_valid && kq0 < NOUT2) check_out("pair0", pair0_llr, pair0_bit, ref2, 4 * L, kq0, eq0);
      if (pair1_valid && kq1 < NOUT2) check_out("pair1", pair1_llr, pair1_bit, ref2, 4 * L + H, kq1, eq1);
      if (mab_valid && km < NOUT2) check_out("mab", mab_llr, mab_bit, ref2, 4 * L, km, em);
      if (na2_valid && ka < NOUT2) check_out("na2", na2_llr, na2_bit, ref2, 4 * L, ka, ea);
      if (k < NSYM && (k / L) >= 4 && (k / L) < 12 && $urandom_range(0, 7) == 0) begin
        in_valid = 1'b0;
        n_stall++;
      end else if (k < NSYM) begin
        in_valid = 1'b1;
        y0 = ysoft_t'(ry0[k]);
        y1 = ysoft_t'(ry1[k]);
        punct = rp[k][1:0];
        if (rp[k] != 0) n_punct++;
        k++;
      end else begin
        in_valid = 1'b1;
        y0 = '0; y1 = '0; punct = '0;
      end
      // the pair's second stream repeats the first, L/2 enabled cycles later
      if (in_valid && pair1_accept) begin
        if (k1 < NSYM) begin
          pair1_y0 = ysoft_t'(ry0[k1]); pair1_y1 = ysoft_t'(ry1[k1]); pair1_punct = rp[k1][1:0];
        end else begin
          pair1_y0 = '0; pair1_y1 = '0; pair1_punct = '0;
        end
        k1++;
      end
    end
    checks++; if (e2 != 0 || e3 != 0 || ep != 0 || ea != 0 || em != 0 || eq0 != 0 || eq1 != 0) begin failures++; $display("bit errors at high SNR"); end
    checks++; if (n_stall == 0) begin failures++; $display("no stall"); end
    checks++; if (n_seg2 < 28) begin failures++; $display("too few segments"); end
    checks++; if (n_up2 == 0 || n_dn2 == 0 || n_up3 == 0 || n_dn3 == 0 || n_upp == 0 || n_dnp == 0) begin failures++; $display("a reversal memory used one direction only"); end
    checks++; if (n_seed == 0) begin failures++; $display("no seed hand-over"); end
    for (int u = 0; u < 3; u++) begin
      checks++; if (n_load3[u] == 0 || n_gen3[u] == 0) begin failures++; $display("backward unit %0d idle", u); end
    end
    for (int i = 0; i < 3; i++) begin
      checks++; if (n_ptr[i] == 0) begin failures++; $display("pointer register %0d never written", i); end
    end
    checks++; if (n_b3 == 0 || n_b2w == 0) begin failures++; $display("pointer decoder: RU_B3 restarts %0d, RU_B2 writes %0d", n_b3, n_b2w); end
    checks++; if (n_fa1 == 0 || n_fa2 == 0) begin failures++; $display("(2,2) decoder: a forward unit never fed the LLR unit"); end
    checks++; if (n_dual == 0) begin failures++; $display("(A+B)/2 decoder: the two LLR units never worked together"); end
    checks++; if (n_share == 0) begin failures++; $display("decoder pair: no shared memory access"); end
    checks++; if (n_punct == 0) begin failures++; $display("no punctured symbol"); end
    checks++; if (n_wrap2 == 0 || n_wrap3 == 0) begin failures++; $display("no metric wrap-around"); end
    $display("nb2: outputs=%0d segments=%0d up=%0d down=%0d seeds=%0d wraps=%0d",
             k2, n_seg2, n_up2, n_dn2, n_seed, n_wrap2);
    $display("nb3: outputs=%0d up=%0d down=%0d loads=%0d/%0d/%0d gens=%0d/%0d/%0d wraps=%0d",
             k3, n_up3, n_dn3, n_load3[0], n_load3[1], n_load3[2], n_gen3[0], n_gen3[1], n_gen3[2], n_wrap3);
    $display("pt: outputs=%0d up=%0d down=%0d pointers=%0d/%0d/%0d b3_restarts=%0d b2_writes=%0d",
             kp, n_upp, n_dnp, n_ptr[0], n_ptr[1], n_ptr[2], n_b3, n_b2w);
    $display("mab: outputs=%0d dual_llr_cycles=%0d", km, n_dual);
    $display("pair: outputs=%0d/%0d shared_accesses=%0d", kq0, kq1, n_share);
    $display("na2: outputs=%0d from_a1=%0d from_a2=%0d", ka, n_fa1, n_fa2);
    $display("stalls=%0d punctured=%0d", n_stall, n_punct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
