// map_decoder_nb2: real-time sliding-window log-MAP decoder, (n_A = 1, n_B = 2, M_A) schedule.
//
// A continuous stream of rate-1/2 soft symbols enters at one symbol per enabled clock; the
// decoder returns one LLR per enabled clock, in natural order, 4L + 1 enabled cycles after
// the symbol it belongs to. The stream is cut into blocks of L symbols (L = convergence
// length). In each L-cycle segment (see schedule_controller):
//   * RU_B1 runs a backward recursion from the all-zero vector over the newest complete
//     block; after L steps its vector is taken as the true backward metric (convergence);
//   * RU_A continues the forward recursion over the block before it and writes each A_k into
//     the state vector memory (SVM, L vectors of NS*NSM bits);
//   * RU_B2 starts from RU_B1's final vector and runs backwards over the block before that,
//     reading the matching A_k back from the SVM (which reverses their order), while the LLR
//     unit produces L(u_k) in reverse order into the LLR reversal memory;
//   * the LLRs of the previous segment are read back in natural order and registered out.
// All three recursion units use OACS elements. Symbols (not branch metrics) are stored; each
// unit has its own branch metric unit. in_valid = 0 stalls the whole decoder for that cycle.
// The forward recursion starts, at the first symbol, from A_INIT, which by default is the
// stationary vector (47.25, 0, 15.75, 0) of the (7,5) code, so state 0 is the known start.
// Schedule, unit counts and memory organisation follow the document; the stall input,
// reset, widths not printed there and output register are this design's choices.
module map_decoder_nb2
  import map_pkg::*;
#(
  parameter int      L      = 64,
  parameter sm_vec_t A_INIT = '{NSM'(378), NSM'(0), NSM'(126), NSM'(0)}
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  ysoft_t                y0,
  input  ysoft_t                y1,
  input  logic [1:0]            punct,
  output logic                  out_valid,
  output logic signed [NSM-1:0] llr,
  output logic                  bit_out
);

  localparam int AW = $clog2(L);
  localparam int RD_B1 = 0, RD_A = 1, RD_B2 = 2;

  logic       en;
  sched_ctl_t ctl;

  assign en = in_valid;

  schedule_controller #(.L(L)) u_ctl (.clk, .rst_n, .en, .ctl);

  // ---------------- received symbols ----------------
  sym_t             sym_in;
  logic [1:0]       rd_bank [3];
  logic [AW-1:0]    rd_addr [3];
  sym_t             rd_sym  [3];

  assign sym_in = '{punct: punct, y1: y1, y0: y0};
  assign rd_bank[RD_B1] = ctl.b1_bank;
  assign rd_bank[RD_A]  = ctl.a_bank;
  assign rd_bank[RD_B2] = ctl.b2_bank;
  assign rd_addr[RD_B1] = AW'(ctl.rev_addr);
  assign rd_addr[RD_A]  = AW'(ctl.fwd_addr);
  assign rd_addr[RD_B2] = AW'(ctl.rev_addr);

  symbol_buffer #(.L(L), .NBANK(4), .NRD(3)) u_symbuf (
    .clk, .wr_en(en), .wr_bank(ctl.wr_bank), .wr_addr(AW'(ctl.fwd_addr)), .wr_data(sym_in),
    .rd_bank, .rd_addr, .rd_data(rd_sym)
  );

  bm_vec_t bm_b1, bm_a, bm_b2;
  branch_metric_unit u_bmu_b1 (.sym(rd_sym[RD_B1]), .bm(bm_b1));
  branch_metric_unit u_bmu_a  (.sym(rd_sym[RD_A]),  .bm(bm_a));
  branch_metric_unit u_bmu_b2 (.sym(rd_sym[RD_B2]), .bm(bm_b2));

  // ---------------- recursion units ----------------
  sm_vec_t zero_vec, b1_cur, b1_seed, a_cur, b2_cur;

  always_comb
    for (int s = 0; s < NS; s++) zero_vec[s] = '0;

  recursion_unit #(.FORWARD(1'b0)) u_ru_b1 (
    .clk, .rst_n, .en, .load(ctl.b1_load), .init(zero_vec), .bm(bm_b1), .sm_cur(b1_cur),
    .sm_reg(b1_seed), .dec(), .ofs()
  );

  recursion_unit #(.FORWARD(1'b1)) u_ru_a (
    .clk, .rst_n, .en(en && ctl.a_run), .load(ctl.a_load), .init(A_INIT), .bm(bm_a),
    .sm_cur(a_cur), .sm_reg(), .dec(), .ofs()
  );

  // At the first step of a segment RU_B1's registers still hold the vector it converged to
  // in the previous segment: that is the seed of RU_B2.
  recursion_unit #(.FORWARD(1'b0)) u_ru_b2 (
    .clk, .rst_n, .en, .load(ctl.b2_load), .init(b1_seed), .bm(bm_b2), .sm_cur(b2_cur),
    .sm_reg(), .dec(), .ofs()
  );

  // ---------------- state vector memory ----------------
  logic [NS*NSM-1:0] svm_wdata, svm_rdata;
  sm_vec_t           a_rev;

  always_comb
    for (int s = 0; s < NS; s++) begin
      svm_wdata[s*NSM +: NSM] = a_cur[s];
      a_rev[s]                = svm_rdata[s*NSM +: NSM];
    end

  reversal_memory #(.L(L), .W(NS*NSM)) u_svm (
    .clk, .en(en && ctl.a_run), .addr(AW'(ctl.svm_addr)), .wdata(svm_wdata), .rdata(svm_rdata)
  );

  // ---------------- soft output ----------------
  logic signed [NSM-1:0] llr_rev, llr_nat;

  llr_unit u_llr (.a(a_rev), .b(b2_cur), .bm(bm_b2), .llr(llr_rev));

  reversal_memory #(.L(L), .W(NSM)) u_llr_mem (
    .clk, .en(en && ctl.llr_run), .addr(AW'(ctl.svm_addr)), .wdata(llr_rev), .rdata(llr_nat)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      llr       <= '0;
      bit_out   <= 1'b0;
    end else begin
      out_valid <= en && ctl.out_run;
      if (en) begin
        llr     <= llr_nat;
        bit_out <= (llr_nat > 0);
      end
    end

endmodule
