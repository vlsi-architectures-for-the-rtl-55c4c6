// map_decoder_nb3: real-time sliding-window log-MAP decoder, (n_A = 1, n_B = 3, M_B) schedule.
//
// Same stream interface and arithmetic as map_decoder_nb2, but with a third backward unit
// the latency drops from 4L to 3L and the vector memory from L to L/2 vectors. The stream is
// cut into half-blocks of H = L/2 symbols. Every H cycles a backward unit restarts from the
// all-zero vector and runs for 3H steps: the first L steps converge, the last H steps
// produce the backward vectors B_{k+1} of one half-block, which are written into the B
// memory (H vectors, read and written at one up/down address). In the next H cycles the
// single forward unit RU_A runs over that half-block, reads the B vectors back in natural
// order and the LLR unit produces L(u_k) directly in natural order, so no LLR reordering
// memory is needed. Symbols are kept in 8 banks of H (one written, four read: one per
// backward unit and one by RU_A).
// Timing: the symbol accepted in enabled cycle n gives its LLR, with out_valid high, in the
// clock after enabled cycle n + 3L. in_valid = 0 stalls everything for a cycle.
// Schedule, unit count and memory size follow the document; stall, reset, widths not given
// there and the output register are this design's choices.
module map_decoder_nb3
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

  localparam int H  = L / 2;
  localparam int AW = $clog2(H);
  localparam int RD_A = 3;

  logic        en;
  sched3_ctl_t ctl;

  assign en = in_valid;

  schedule_controller_nb3 #(.L(L)) u_ctl (.clk, .rst_n, .en, .ctl);

  // ---------------- received symbols ----------------
  sym_t          sym_in;
  logic [2:0]    rd_bank [4];
  logic [AW-1:0] rd_addr [4];
  sym_t          rd_sym  [4];

  assign sym_in = '{punct: punct, y1: y1, y0: y0};

  always_comb begin
    for (int u = 0; u < 3; u++) begin
      rd_bank[u] = ctl.b_bank[u];
      rd_addr[u] = AW'(ctl.rev_addr);
    end
    rd_bank[RD_A] = ctl.a_bank;
    rd_addr[RD_A] = AW'(ctl.fwd_addr);
  end

  symbol_buffer #(.L(H), .NBANK(8), .NRD(4)) u_symbuf (
    .clk, .wr_en(en), .wr_bank(ctl.wr_bank), .wr_addr(AW'(ctl.fwd_addr)), .wr_data(sym_in),
    .rd_bank, .rd_addr, .rd_data(rd_sym)
  );

  // ---------------- backward units ----------------
  sm_vec_t zero_vec;
  sm_vec_t b_cur [3];

  always_comb
    for (int s = 0; s < NS; s++) zero_vec[s] = '0;

  for (genvar u = 0; u < 3; u++) begin : g_bu
    bm_vec_t bm;
    branch_metric_unit u_bmu (.sym(rd_sym[u]), .bm(bm));
    recursion_unit #(.FORWARD(1'b0)) u_ru (
      .clk, .rst_n, .en, .load(ctl.b_load[u]), .init(zero_vec), .bm(bm), .sm_cur(b_cur[u]),
      .sm_reg(), .dec(), .ofs()
    );
  end

  // ---------------- B vector memory ----------------
  logic [NS*NSM-1:0] bmem_wdata, bmem_rdata;
  sm_vec_t           b_gen, b_rev;

  always_comb begin
    b_gen = b_cur[ctl.gen_unit];
    for (int s = 0; s < NS; s++) begin
      bmem_wdata[s*NSM +: NSM] = b_gen[s];
      b_rev[s]                 = bmem_rdata[s*NSM +: NSM];
    end
  end

  reversal_memory #(.L(H), .W(NS*NSM)) u_bmem (
    .clk, .en(en && ctl.bmem_we), .addr(AW'(ctl.bmem_addr)), .wdata(bmem_wdata),
    .rdata(bmem_rdata)
  );

  // ---------------- forward unit and soft output ----------------
  bm_vec_t bm_a;
  sm_vec_t a_cur;
  logic signed [NSM-1:0] llr_nat;

  branch_metric_unit u_bmu_a (.sym(rd_sym[RD_A]), .bm(bm_a));

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
