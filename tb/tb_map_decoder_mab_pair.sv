// tb_map_decoder_mab_pair: end-to-end test of two interleaved (n_A = 1, n_B = 2, M_(A+B)/2)
// decoders sharing their state memories, at the default size (L = 64).
//
// Two independent random (7,5)-encoded streams, each at three noise levels and with
// punctured parity in some blocks, are fed with shared random stalls; stream 1 is fed only
// when the pair accepts it. Every LLR of each stream is compared bit for bit with the integer
// reference of map_ref_pkg (windows of L, convergence length L), and each output must come
// 4L enabled cycles after its symbol. Hard decisions at high SNR must be error-free. The test
// also requires that stalls happened, that each decoder wrote the shared memories, that a
// read and a write by different decoders met in the same cycle, and that both LLR units of
// each decoder were used.
module tb_map_decoder_mab_pair;
  import map_pkg::*;
  import map_ref_pkg::*;

  localparam int L    = 64;
  localparam int NSYM = 28 * L;
  localparam int NOUT = NSYM - L;
  localparam int LAT  = 4 * L;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  ysoft_t y0_0 = '0, y1_0 = '0, y0_1 = '0, y1_1 = '0;
  logic [1:0] punct_0 = '0, punct_1 = '0;
  logic in1_accept, out_valid_0, bit_out_0, out_valid_1, bit_out_1;
  logic signed [NSM-1:0] llr_0, llr_1;

  map_decoder_mab_pair dut (.clk, .rst_n, .in_valid, .y0_0, .y1_0, .punct_0, .y0_1, .y1_1,
                            .punct_1, .in1_accept, .out_valid_0, .llr_0, .bit_out_0,
                            .out_valid_1, .llr_1, .bit_out_1);

  always #5 clk = ~clk;

  initial begin
    #(5_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int info [2][], ry0 [2][], ry1 [2][], rp [2][], refllr [2][], rtmp [];

  int en_idx [2] = '{0, 0};
  always @(posedge clk) if (rst_n && in_valid) begin
    en_idx[0] <= en_idx[0] + 1;
    if (in1_accept) en_idx[1] <= en_idx[1] + 1;
  end

  int n_stall = 0, n_wr [2] = '{0, 0}, n_shared = 0, n_both [2] = '{0, 0}, n_punct = 0;

  always @(posedge clk) if (rst_n && in_valid) begin
    if (dut.mem_en) n_wr[dut.wr_sel]++;
    if (dut.mem_en && dut.ctl[0].a1_run && dut.ctl[1].a1_run) n_shared++;
    if (dut.g_dec[0].llr_we) n_both[0]++;
    if (dut.g_dec[1].llr_we) n_both[1]++;
  end

  int ko [2] = '{0, 0}, e [2] = '{0, 0};

  task automatic check_out(int d, logic signed [NSM-1:0] v, logic hb);
    int k;
    k = ko[d];
    checks++;
    if (int'(v) != refllr[d][k]) begin
      failures++;
      if (failures < 10) $display("stream %0d llr mismatch k=%0d dut=%0d ref=%0d", d, k, v, refllr[d][k]);
    end
    checks++;
    if (en_idx[d] - 1 - k != LAT) begin
      failures++;
      if (failures < 10) $display("stream %0d latency k=%0d got %0d", d, k, en_idx[d] - 1 - k);
    end
    checks++;
    if (hb != (refllr[d][k] > 0)) failures++;
    if (k < 8 * L && hb != info[d][k][0]) e[d]++;
    ko[d] = k + 1;
  endtask

  initial begin
    int k [2], s;
    real amp, sigma;
    for (int d = 0; d < 2; d++) begin
      info[d] = new[NSYM]; ry0[d] = new[NSYM]; ry1[d] = new[NSYM]; rp[d] = new[NSYM];
      s = 0;
      for (int i = 0; i < NSYM; i++) begin
        int b;
        b = i / L;
        info[d][i] = $urandom_range(0, 1);
        if (b < 8)       begin amp = 2.0; sigma = 0.3; end
        else if (b < 16) begin amp = 2.0; sigma = 2.5; end
        else             begin amp = 3.0; sigma = 1.0; end
        ry0[d][i] = quant((info[d][i] ? amp : -amp) + sigma * gauss());
        ry1[d][i] = quant((PAR[s][info[d][i]] ? amp : -amp) + sigma * gauss());
        s = NXT[s][info[d][i]];
        rp[d][i] = (b >= 16 && b < 22 && (i % 2 == d)) ? 2 : 0;
      end
      reference(ry0[d], ry1[d], rp[d], L, L, rtmp);
      refllr[d] = rtmp;
      k[d] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (ko[0] < NOUT || ko[1] < NOUT) begin
      @(negedge clk);
      if (out_valid_0 && ko[0] < NOUT) check_out(0, llr_0, bit_out_0);
      if (out_valid_1 && ko[1] < NOUT) check_out(1, llr_1, bit_out_1);
      if ((k[0] / L) >= 4 && (k[0] / L) < 12 && $urandom_range(0, 7) == 0) begin
        in_valid = 1'b0;
        n_stall++;
      end else begin
        in_valid = 1'b1;
        if (k[0] < NSYM) begin
          y0_0 = ysoft_t'(ry0[0][k[0]]); y1_0 = ysoft_t'(ry1[0][k[0]]);
          punct_0 = rp[0][k[0]][1:0];
          if (rp[0][k[0]] != 0) n_punct++;
        end else begin
          y0_0 = '0; y1_0 = '0; punct_0 = '0;
        end
        k[0]++;
        if (in1_accept) begin
          if (k[1] < NSYM) begin
            y0_1 = ysoft_t'(ry0[1][k[1]]); y1_1 = ysoft_t'(ry1[1][k[1]]);
            punct_1 = rp[1][k[1]][1:0];
          end else begin
            y0_1 = '0; y1_1 = '0; punct_1 = '0;
          end
          k[1]++;
        end
      end
    end
    checks++; if (e[0] != 0 || e[1] != 0) begin failures++; $display("bit errors at high SNR: %0d %0d", e[0], e[1]); end
    checks++; if (n_stall == 0) begin failures++; $display("no stall"); end
    checks++; if (n_wr[0] == 0 || n_wr[1] == 0) begin failures++; $display("a decoder never wrote the shared memories"); end
    checks++; if (n_shared == 0) begin failures++; $display("the decoders never shared a memory access"); end
    checks++; if (n_both[0] == 0 || n_both[1] == 0) begin failures++; $display("a decoder never used both LLR units"); end
    checks++; if (n_punct == 0) begin failures++; $display("no punctured symbol"); end
    $display("outputs=%0d/%0d stalls=%0d writes=%0d/%0d shared=%0d dual_llr=%0d/%0d punct=%0d",
             ko[0], ko[1], n_stall, n_wr[0], n_wr[1], n_shared, n_both[0], n_both[1], n_punct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
