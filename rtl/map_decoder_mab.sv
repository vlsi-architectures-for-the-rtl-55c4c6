// map_decoder_mab: real-time sliding-window log-MAP decoder, (n_A = 1, n_B = 2, M_(A+B)/2)
// schedule.
//
// Same stream interface, arithmetic and LLR values as map_decoder_nb2, but the state memory
// holds half A vectors and half B vectors. RU_B1 converges over block T-1; RU_B2 continues
// from its result backwards over block T-3 while RU_A runs forwards over the same block, so
// the two units cross in the middle of the segment:
//   * in the lower half of the segment RU_B2 stores the B vectors of the upper half of the
//     block and RU_A stores the A vectors of the lower half (one L/2 memory each);
//   * in the upper half of the segment both units reach symbols whose partner vector is
//     stored, so two LLR units work at once: one on RU_A's A and the stored B (upper half of
//     the block, increasing order), one on the stored A and RU_B2's B (lower half,
//     decreasing order).
// So the L LLRs of a block are all produced in the last L/2 cycles of a segment. Each LLR
// unit writes into its own L/2-word output memory, and the next segment reads them in
// natural order. Both state memories read and write one address per cycle, counting up and
// down in alternate half-segments, so each half-block comes back reversed.
// Timing: the symbol accepted in enabled cycle n gives its LLR, with out_valid high, in the
// clock after enabled cycle n + 4L. in_valid = 0 stalls everything for a cycle.
// The schedule is the same as the (n_A = 2, n_B = 2) decoder's up to its second forward
// unit, so this decoder reuses schedule_controller_na2 and its 5-bank symbol rotation; only
// four banks are read or written (the one its RU_A2 would read stays unused).
// The unit roles, the L/2 + L/2 memory, the two LLR units and the 4L latency follow the
// document; the memory addressing, the output memories, bank count, stall, reset and
// output register are this design's choices.
module map_decoder_mab
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
  localparam int HW = $clog2(L / 2);
  localparam int RD_B1 = 0, RD_B2 = 1, RD_A = 2;

  logic           en;
  sched_na2_ctl_t ctl;

  assign en = in_valid;

  schedule_controller_na2 #(.L(L)) u_ctl (.clk, .rst_n, .en, .ctl);

  // ---------------- received symbols ----------------
  sym_t          sym_in;
  logic [2:0]    rd_bank [3];
  logic [AW-1:0] rd_addr [3];
  sym_t          rd_sym  [3];

  assign sym_in = '{punct: punct, y1: y1, y0: y0};
  assign rd_bank[RD_B1] = ctl.b1_bank;
  assign rd_bank[RD_B2] = ctl.b2_bank;
  assign rd_bank[RD_A]  = ctl.b2_bank;
  assign rd_addr[RD_B1] = AW'(ctl.rev_addr);
  assign rd_addr[RD_B2] = AW'(ctl.rev_addr);
  assign rd_addr[RD_A]  = AW'(ctl.fwd_addr);

  symbol_buffer #(.L(L), .NBANK(5), .NRD(3)) u_symbuf (
    .clk, .wr_en(en), .wr_bank(ctl.wr_bank), .wr_addr(AW'(ctl.fwd_addr)), .wr_data(sym_in),
    .rd_bank, .rd_addr, .rd_data(rd_sym)
  );

  bm_vec_t bm_b1, bm_b2, bm_a;
  branch_metric_unit u_bmu_b1 (.sym(rd_sym[RD_B1]), .bm(bm_b1));
  branch_metric_unit u_bmu_b2 (.sym(rd_sym[RD_B2]), .bm(bm_b2));
  branch_metric_unit u_bmu_a  (.sym(rd_sym[RD_A]),  .bm(bm_a));

  // ---------------- recursion units ----------------
  sm_vec_t zero_vec, b1_seed, b2_cur, a_cur, b_rev, a_rev;
  logic [NS*NSM-1:0] bmem_wdata, bmem_rdata, amem_wdata, amem_rdata;

  always_comb
    for (int s = 0; s < NS; s++) begin
      zero_vec[s]              = '0;
      bmem_wdata[s*NSM +: NSM] = b2_cur[s];
      amem_wdata[s*NSM +: NSM] = a_cur[s];
      b_rev[s]                 = bmem_rdata[s*NSM +: NSM];
      a_rev[s]                 = amem_rdata[s*NSM +: NSM];
    end

  recursion_unit #(.FORWARD(1'b0)) u_ru_b1 (
    .clk, .rst_n, .en, .load(ctl.b1_load), .init(zero_vec), .bm(bm_b1), .sm_cur(),
    .sm_reg(b1_seed), .dec(), .ofs()
  );

  recursion_unit #(.FORWARD(1'b0)) u_ru_b2 (
    .clk, .rst_n, .en, .load(ctl.b2_load), .init(b1_seed), .bm(bm_b2), .sm_cur(b2_cur),
    .sm_reg(), .dec(), .ofs()
  );

  recursion_unit #(.FORWARD(1'b1)) u_ru_a (
    .clk, .rst_n, .en(en && ctl.a1_run), .load(ctl.a1_load), .init(A_INIT), .bm(bm_a),
    .sm_cur(a_cur), .sm_reg(), .dec(), .ofs()
  );

  // B of the upper half-block, written in the lower half of the segment
  reversal_memory #(.L(L / 2), .W(NS*NSM)) u_bmem (
    .clk, .en(en && ctl.bmem_we && !ctl.upper), .addr(HW'(ctl.bmem_addr)),
    .wdata(bmem_wdata), .rdata(bmem_rdata)
  );

  // A of the lower half-block, written in the lower half of the segment
  reversal_memory #(.L(L / 2), .W(NS*NSM)) u_amem (
    .clk, .en(en && ctl.a1_run && !ctl.upper), .addr(HW'(ctl.bmem_addr)),
    .wdata(amem_wdata), .rdata(amem_rdata)
  );

  // ---------------- two LLR units ----------------
  logic signed [NSM-1:0] llr_up, llr_lo, llr_up_q, llr_lo_q, llr_out;
  logic                  llr_we;

  llr_unit u_llr_up (.a(a_cur), .b(b_rev), .bm(bm_a),  .llr(llr_up));
  llr_unit u_llr_lo (.a(a_rev), .b(b2_cur), .bm(bm_b2), .llr(llr_lo));

  assign llr_we = en && ctl.upper && ctl.a1_run;

  // upper step k writes symbol L/2 + k at address k; read back at step L/2 + k of the next
  // segment, just before it is overwritten
  reversal_memory #(.L(L / 2), .W(NSM)) u_llr_up_mem (
    .clk, .en(llr_we), .addr(HW'(ctl.half_addr)), .wdata(llr_up), .rdata(llr_up_q)
  );

  // upper step k writes symbol L/2-1-k at address L/2-1-k; read at step j < L/2 of the next
  // segment at address j
  reversal_memory #(.L(L / 2), .W(NSM)) u_llr_lo_mem (
    .clk, .en(llr_we),
    .addr(ctl.upper ? HW'(HW'(L/2 - 1) - HW'(ctl.half_addr)) : HW'(ctl.half_addr)),
    .wdata(llr_lo), .rdata(llr_lo_q)
  );

  assign llr_out = ctl.upper ? llr_up_q : llr_lo_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      llr       <= '0;
      bit_out   <= 1'b0;
    end else begin
      out_valid <= en && ctl.a2_run;
      if (en) begin
        llr     <= llr_out;
        bit_out <= (llr_out > 0);
      end
    end

endmodule
