// map_decoder_pt: real-time sliding-window log-MAP decoder, pointer-based
// (n_A = 1, n_B = 3, M_B, Pt_B) schedule.
//
// Same stream interface, arithmetic and LLR values as map_decoder_nb2, but the L-vector state
// memory is replaced by three pointer registers and a B memory of only L/4 vectors. RU_B1
// converges over block T-1 from the all-zero vector; RU_B2 continues from its result over
// block T-3 and, every L/4 steps, saves its current vector as a pointer. One block later
// RU_B3 restarts from those pointers and recomputes quarters 1..3 of that block, one quarter
// at a time and just before they are needed. RU_B2 itself supplies quarter 0. The B memory
// (one address, read then written each cycle, counting up and down in alternate quarters)
// reverses each quarter, so the forward unit RU_A and the LLR unit consume the backward
// vectors in natural order and the LLRs need no reordering. A pointer restart reproduces
// RU_B2's values exactly, because a loaded vector carries the full metric with zero offset.
// Symbols are kept in 5 banks of L: one written, four read (RU_B1, RU_B2, RU_B3, RU_A).
// Timing: the symbol accepted in enabled cycle n gives its LLR, with out_valid high, in the
// clock after enabled cycle n + 4L. in_valid = 0 stalls everything for a cycle.
// The unit roles, the pointer spacing, the number of pointers and the B memory size follow
// the document; the register allocation, bank count, stall, reset and output register are
// this design's choices.
module map_decoder_pt
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
  localparam int QW = $clog2(L / 4);
  localparam int RD_B1 = 0, RD_B2 = 1, RD_B3 = 2, RD_A = 3;

  logic          en;
  sched_pt_ctl_t ctl;

  assign en = in_valid;

  schedule_controller_pt #(.L(L)) u_ctl (.clk, .rst_n, .en, .ctl);

  // ---------------- received symbols ----------------
  sym_t          sym_in;
  logic [2:0]    rd_bank [4];
  logic [AW-1:0] rd_addr [4];
  sym_t          rd_sym  [4];

  assign sym_in = '{punct: punct, y1: y1, y0: y0};
  assign rd_bank[RD_B1] = ctl.b1_bank;
  assign rd_bank[RD_B2] = ctl.b2_bank;
  assign rd_bank[RD_B3] = ctl.a_bank;
  assign rd_bank[RD_A]  = ctl.a_bank;
  assign rd_addr[RD_B1] = AW'(ctl.rev_addr);
  assign rd_addr[RD_B2] = AW'(ctl.rev_addr);
  assign rd_addr[RD_B3] = AW'(ctl.b3_addr);
  assign rd_addr[RD_A]  = AW'(ctl.fwd_addr);

  symbol_buffer #(.L(L), .NBANK(5), .NRD(4)) u_symbuf (
    .clk, .wr_en(en), .wr_bank(ctl.wr_bank), .wr_addr(AW'(ctl.fwd_addr)), .wr_data(sym_in),
    .rd_bank, .rd_addr, .rd_data(rd_sym)
  );

  bm_vec_t bm_b1, bm_b2, bm_b3, bm_a;
  branch_metric_unit u_bmu_b1 (.sym(rd_sym[RD_B1]), .bm(bm_b1));
  branch_metric_unit u_bmu_b2 (.sym(rd_sym[RD_B2]), .bm(bm_b2));
  branch_metric_unit u_bmu_b3 (.sym(rd_sym[RD_B3]), .bm(bm_b3));
  branch_metric_unit u_bmu_a  (.sym(rd_sym[RD_A]),  .bm(bm_a));

  // ---------------- backward units and pointers ----------------
  sm_vec_t zero_vec, b1_seed, b2_cur, b3_cur, ptr_rd;
  sm_vec_t ptr [3];

  always_comb
    for (int s = 0; s < NS; s++) zero_vec[s] = '0;

  recursion_unit #(.FORWARD(1'b0)) u_ru_b1 (
    .clk, .rst_n, .en, .load(ctl.b1_load), .init(zero_vec), .bm(bm_b1), .sm_cur(),
    .sm_reg(b1_seed), .dec(), .ofs()
  );

  recursion_unit #(.FORWARD(1'b0)) u_ru_b2 (
    .clk, .rst_n, .en, .load(ctl.b2_load), .init(b1_seed), .bm(bm_b2), .sm_cur(b2_cur),
    .sm_reg(), .dec(), .ofs()
  );

  // the pointer read by RU_B3 is replaced by RU_B2's current vector in the same step
  assign ptr_rd = ptr[ctl.seed_slot];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < 3; i++)
        for (int s = 0; s < NS; s++) ptr[i][s] <= '0;
    end else if (en && ctl.seed_we) begin
      ptr[ctl.seed_slot] <= b2_cur;
    end

  recursion_unit #(.FORWARD(1'b0)) u_ru_b3 (
    .clk, .rst_n, .en(en && ctl.b3_gen), .load(ctl.b3_load), .init(ptr_rd), .bm(bm_b3),
    .sm_cur(b3_cur), .sm_reg(), .dec(), .ofs()
  );

  // ---------------- B vector memory (L/4 vectors) ----------------
  logic [NS*NSM-1:0] bmem_wdata, bmem_rdata;
  sm_vec_t           b_gen, b_rev;

  always_comb begin
    b_gen = ctl.b3_gen ? b3_cur : b2_cur;
    for (int s = 0; s < NS; s++) begin
      bmem_wdata[s*NSM +: NSM] = b_gen[s];
      b_rev[s]                 = bmem_rdata[s*NSM +: NSM];
    end
  end

  reversal_memory #(.L(L / 4), .W(NS*NSM)) u_bmem (
    .clk, .en(en && ctl.bmem_we), .addr(QW'(ctl.bmem_addr)), .wdata(bmem_wdata),
    .rdata(bmem_rdata)
  );

  // ---------------- forward unit and soft output ----------------
  sm_vec_t a_cur;
  logic signed [NSM-1:0] llr_nat;

  recursion_unit #(.FORWARD(1'b1)) u_ru_a (
    .clk, .rst_n, .en(en && ctl.a_run), .load(ctl.a_load), .init(A_INIT), .bm(bm_a),
    .sm_cur(a_cur), .sm_reg(), .dec(), .ofs()
  );

  llr_unit u_llr (.a(a_cur), .b(b_rev), .bm(bm_a), .llr(llr_nat));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      llr       <= '0;
      bit_out   <= 1'b0;
    end else begin
      out_valid <= en && ctl.a_run;
      if (en) begin
        llr     <= llr_nat;
        bit_out <= (llr_nat > 0);
      end
    end

endmodule
