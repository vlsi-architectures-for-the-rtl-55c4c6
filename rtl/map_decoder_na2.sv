// map_decoder_na2: real-time sliding-window log-MAP decoder, (n_A = 2, n_B = 2, M_B) schedule.
//
// Same stream interface, arithmetic and LLR values as map_decoder_nb2, with the state memory
// halved by a second forward unit. RU_B1 converges over block T-1; RU_B2 continues from its
// result backwards over block T-3 while RU_A1 runs forwards over the same block, so they
// meet in the middle. RU_B2's vectors go into a B memory of L/2 words:
//   * upper half of the block: RU_B2 passes first (lower half of the segment), RU_A1 arrives
//     in the upper half of the segment and the LLR unit combines them at once;
//   * lower half of the block: RU_A1 passes before RU_B2, so its A vectors are recomputed
//     one segment later by RU_A2, a forward_copy_unit that replays RU_A1's stored decisions
//     and offsets (simplified ACSO elements); RU_B2's vectors of that half wait for it.
// The B memory reads and writes one address per cycle, counting up and down in alternate
// half-segments, so each half-block comes back in increasing order. The one LLR unit serves
// RU_A2 in the lower half of each segment and RU_A1 in the upper half. Upper-half LLRs are
// delayed by one segment in an L/2-word memory, so all LLRs leave in natural order.
// Decisions and offsets of RU_A1 are kept for L cycles in an L-word memory (NS decision bits
// and NS offsets per step), read and written at address j.
// Symbols are kept in 5 banks of L: one written, four read (RU_B1, RU_B2, RU_A1, RU_A2).
// Timing: the symbol accepted in enabled cycle n gives its LLR, with out_valid high, in the
// clock after enabled cycle n + 4L. in_valid = 0 stalls everything for a cycle.
// The unit roles, the L/2 memory, the replay of decisions and offsets and the 4L latency
// follow the document; the memory organisation, LLR delay memory, bank count, stall, reset
// and output register are this design's choices.
module map_decoder_na2
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
  localparam int RD_B1 = 0, RD_B2 = 1, RD_A1 = 2, RD_A2 = 3;
  localparam int DW = NS * (1 + OFS_W);   // decisions and offsets of one step

  logic           en;
  sched_na2_ctl_t ctl;

  assign en = in_valid;

  schedule_controller_na2 #(.L(L)) u_ctl (.clk, .rst_n, .en, .ctl);

  // ---------------- received symbols ----------------
  sym_t          sym_in;
  logic [2:0]    rd_bank [4];
  logic [AW-1:0] rd_addr [4];
  sym_t          rd_sym  [4];

  assign sym_in = '{punct: punct, y1: y1, y0: y0};
  assign rd_bank[RD_B1] = ctl.b1_bank;
  assign rd_bank[RD_B2] = ctl.b2_bank;
  assign rd_bank[RD_A1] = ctl.b2_bank;
  assign rd_bank[RD_A2] = ctl.a2_bank;
  assign rd_addr[RD_B1] = AW'(ctl.rev_addr);
  assign rd_addr[RD_B2] = AW'(ctl.rev_addr);
  assign rd_addr[RD_A1] = AW'(ctl.fwd_addr);
  assign rd_addr[RD_A2] = AW'(ctl.fwd_addr);

  symbol_buffer #(.L(L), .NBANK(5), .NRD(4)) u_symbuf (
    .clk, .wr_en(en), .wr_bank(ctl.wr_bank), .wr_addr(AW'(ctl.fwd_addr)), .wr_data(sym_in),
    .rd_bank, .rd_addr, .rd_data(rd_sym)
  );

  bm_vec_t bm_b1, bm_b2, bm_a1, bm_a2;
  branch_metric_unit u_bmu_b1 (.sym(rd_sym[RD_B1]), .bm(bm_b1));
  branch_metric_unit u_bmu_b2 (.sym(rd_sym[RD_B2]), .bm(bm_b2));
  branch_metric_unit u_bmu_a1 (.sym(rd_sym[RD_A1]), .bm(bm_a1));
  branch_metric_unit u_bmu_a2 (.sym(rd_sym[RD_A2]), .bm(bm_a2));

  // ---------------- backward units and B memory ----------------
  sm_vec_t zero_vec, b1_seed, b2_cur, b_rev;
  logic [NS*NSM-1:0] bmem_wdata, bmem_rdata;

  always_comb
    for (int s = 0; s < NS; s++) begin
      zero_vec[s]              = '0;
      bmem_wdata[s*NSM +: NSM] = b2_cur[s];
      b_rev[s]                 = bmem_rdata[s*NSM +: NSM];
    end

  recursion_unit #(.FORWARD(1'b0)) u_ru_b1 (
    .clk, .rst_n, .en, .load(ctl.b1_load), .init(zero_vec), .bm(bm_b1), .sm_cur(),
    .sm_reg(b1_seed), .dec(), .ofs()
  );

  recursion_unit #(.FORWARD(1'b0)) u_ru_b2 (
    .clk, .rst_n, .en, .load(ctl.b2_load), .init(b1_seed), .bm(bm_b2), .sm_cur(b2_cur),
    .sm_reg(), .dec(), .ofs()
  );

  reversal_memory #(.L(L / 2), .W(NS*NSM)) u_bmem (
    .clk, .en(en && ctl.bmem_we), .addr(HW'(ctl.bmem_addr)), .wdata(bmem_wdata),
    .rdata(bmem_rdata)
  );

  // ---------------- forward units ----------------
  sm_vec_t       a1_cur, a2_cur;
  logic [NS-1:0] a1_dec, a2_dec;
  ofs_t [NS-1:0] a1_ofs, a2_ofs;
  logic [DW-1:0] dmem_wdata, dmem_rdata;

  recursion_unit #(.FORWARD(1'b1)) u_ru_a1 (
    .clk, .rst_n, .en(en && ctl.a1_run), .load(ctl.a1_load), .init(A_INIT), .bm(bm_a1),
    .sm_cur(a1_cur), .sm_reg(), .dec(a1_dec), .ofs(a1_ofs)
  );

  assign dmem_wdata         = {a1_dec, a1_ofs};
  assign {a2_dec, a2_ofs}   = dmem_rdata;

  // L steps of decisions and offsets: entry j is read (previous segment) and rewritten
  reversal_memory #(.L(L), .W(DW)) u_dmem (
    .clk, .en(en && ctl.a1_run), .addr(AW'(ctl.fwd_addr)), .wdata(dmem_wdata),
    .rdata(dmem_rdata)
  );

  forward_copy_unit u_ru_a2 (
    .clk, .rst_n, .en(en && ctl.a2_run), .load(ctl.a2_load), .init(A_INIT), .bm(bm_a2),
    .dec(a2_dec), .ofs(a2_ofs), .sm_cur(a2_cur)
  );

  // ---------------- soft output ----------------
  sm_vec_t a_sel;
  bm_vec_t bm_sel;
  logic signed [NSM-1:0] llr_now, llr_dly;

  assign a_sel  = ctl.upper ? a1_cur : a2_cur;
  assign bm_sel = ctl.upper ? bm_a1  : bm_a2;

  llr_unit u_llr (.a(a_sel), .b(b_rev), .bm(bm_sel), .llr(llr_now));

  // upper-half LLRs of block T-3 in, those of block T-4 out
  reversal_memory #(.L(L / 2), .W(NSM)) u_llr_dly (
    .clk, .en(en && ctl.upper && ctl.a1_run), .addr(HW'(ctl.half_addr)), .wdata(llr_now),
    .rdata(llr_dly)
  );

  logic signed [NSM-1:0] llr_out;
  assign llr_out = ctl.upper ? llr_dly : llr_now;

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
