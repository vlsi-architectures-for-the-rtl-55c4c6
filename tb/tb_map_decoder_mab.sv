// tb_map_decoder_mab: end-to-end test of the (n_A = 1, n_B = 2, M_(A+B)/2) decoder at its
// default size (L = 64). A random (7,5)-encoded stream at three noise levels, with random
// stalls and punctured parity in some blocks, is decoded and every LLR is compared bit for bit
// with the integer reference of map_ref_pkg run with windows of L and convergence length L
// (the same windows as the (1,2) decoder with an A memory). It also checks the latency of 4L
// enabled cycles, error-free hard decisions at high SNR, and that stalls, both LLR units
// working in the same cycle, both directions of the state memories, outputs from both output
// memories, puncturing and metric wrap-around all occurred.
module tb_map_decoder_mab;
  import map_pkg::*;
  import map_ref_pkg::*;

  localparam int L    = 64;
  localparam int NSYM = 28 * L;
  localparam int NOUT = NSYM - L;
  localparam int LAT  = 4 * L;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  ysoft_t y0 = '0, y1 = '0;
  logic [1:0] punct = '0;
  logic out_valid, bit_out;
  logic signed [NSM-1:0] llr;

  map_decoder_mab dut (.clk, .rst_n, .in_valid, .y0, .y1, .punct, .out_valid, .llr, .bit_out);

  always #5 clk = ~clk;

  initial begin
    #(5_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int info [], ry0 [], ry1 [], rp [], refllr [];

  int en_idx = 0;
  always @(posedge clk) if (rst_n && in_valid) en_idx <= en_idx + 1;

  int n_stall = 0, n_up = 0, n_dn = 0, n_punct = 0, n_wrap = 0, n_lat_ok = 0, n_err_hi = 0;
  int n_from_up = 0, n_from_lo = 0, n_both = 0;
  sm_t last_a0 = '0;

  always @(posedge clk) if (rst_n && in_valid) begin
    if (dut.ctl.bmem_we && dut.ctl.bmem_addr == 16'd0) begin
      if (dut.u_ctl.hdir) n_dn++; else n_up++;
    end
    if (dut.ctl.a2_run) begin
      if (dut.ctl.upper) n_from_up++; else n_from_lo++;
    end
    if (dut.llr_we) n_both++;
    if (dut.ctl.a1_run && !dut.ctl.a1_load) begin
      if (last_a0 > sm_t'(3000) && dut.a_cur[0] < sm_t'(1000)) n_wrap++;
      last_a0 <= dut.a_cur[0];
    end
  end

  initial begin
    int k, k_out, s;
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
    reference(ry0, ry1, rp, L, L, refllr);
    k = 0; k_out = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (k_out < NOUT) begin
      @(negedge clk);
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
        if (k_out < 8 * L && bit_out != info[k_out][0]) n_err_hi++;
        k_out++;
      end
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
    end
    checks++; if (n_err_hi != 0) begin failures++; $display("bit errors at high SNR: %0d", n_err_hi); end
    checks++; if (n_stall == 0) begin failures++; $display("no stall"); end
    checks++; if (n_up == 0 || n_dn == 0) begin failures++; $display("state memories used one direction only"); end
    checks++; if (n_from_up == 0 || n_from_lo == 0) begin failures++; $display("an output memory was never read"); end
    checks++; if (n_both == 0) begin failures++; $display("the two LLR units never worked together"); end
    checks++; if (n_punct == 0) begin failures++; $display("no punctured symbol"); end
    checks++; if (n_wrap == 0) begin failures++; $display("no metric wrap-around"); end
    $display("outputs=%0d stalls=%0d up=%0d down=%0d from_up=%0d from_lo=%0d dual_llr=%0d punct=%0d wraps=%0d latency_ok=%0d",
             k_out, n_stall, n_up, n_dn, n_from_up, n_from_lo, n_both,
             n_punct, n_wrap, n_lat_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
