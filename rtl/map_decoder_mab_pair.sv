// map_decoder_mab_pair: two (n_A = 1, n_B = 2, M_(A+B)/2) log-MAP decoders, for two
// independent streams, that share their two state memories of L/2 vectors.
//
// Each decoder works as map_decoder_mab: RU_B1 converges over block T-1, RU_B2 and RU_A
// sweep block T-3 in opposite directions; in the lower half of a segment RU_B2 stores the B
// vectors of the block's upper half and RU_A the A vectors of its lower half, and in the
// upper half two LLR units combine them with the units' current vectors. A decoder therefore
// writes the state memories only in one half of each segment and reads them only in the
// other. Decoder 1 runs half a segment (L/2 enabled cycles) behind decoder 0, so while one
// decoder reads a memory the other writes it. Each memory makes one access per cycle: the
// word at the common up/down address is read for the decoder in its upper half and
// overwritten with the vector of the decoder in its lower half. The address counts up and
// down in alternate half-segments, so every half-block comes back reversed to the decoder
// that wrote it, L/2 cycles later. The LLR output memories are per decoder.
// Interface: in_valid is shared (low stalls both decoders). Stream 0 (y0_0, y1_0, punct_0)
// is taken in every enabled cycle from reset. Stream 1 (y0_1, y1_1, punct_1) is taken in
// enabled cycles with in1_accept high, which it is from the (L/2 + 1)-th enabled cycle on.
// Timing: each stream's symbol accepted in enabled cycle n gives its LLR, with its
// out_valid high, in the clock after enabled cycle n + 4L, as for map_decoder_mab.
// The two interleaved decoders, the two shared memories of L/2 words with one read and one
// write at the same address per cycle, and the 4L latency follow the document; the
// half-segment offset as the way to interleave, the accept flag, the output memories, bank
// count, stall, reset and output registers are this design's choices.
module map_decoder_mab_pair
  import map_pkg::*;
#(
  parameter int      L      = 64,
  parameter sm_vec_t A_INIT = '{NSM'(378), NSM'(0), NSM'(126), NSM'(0)}
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  ysoft_t                y0_0,
  input  ysoft_t                y1_0,
  input  logic [1:0]            punct_0,
  input  ysoft_t                y0_1,
  input  ysoft_t                y1_1,
  input  logic [1:0]            punct_1,
  output logic                  in1_accept,
  output logic                  out_valid_0,
  output logic signed [NSM-1:0] llr_0,
  output logic                  bit_out_0,
  output logic                  out_valid_1,
  output logic signed [NSM-1:0] llr_1,
  output logic                  bit_out_1
);

  localparam int AW = $clog2(L);
  localparam int H  = L / 2;
  localparam int HW = $clog2(H);
  localparam int RD_B1 = 0, RD_B2 = 1, RD_A = 2;

  logic           en     [2];
  sched_na2_ctl_t ctl    [2];
  sym_t           sym_in [2];

  // decoder 1 starts after the first half-segment of decoder 0
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)
      in1_accept <= 1'b0;
    else if (in_valid && !ctl[0].upper && ctl[0].half_addr == 16'(H-1))
      in1_accept <= 1'b1;

  assign en[0]     = in_valid;
  assign en[1]     = in_valid && in1_accept;
  assign sym_in[0] = '{punct: punct_0, y1: y1_0, y0: y0_0};
  assign sym_in[1] = '{punct: punct_1, y1: y1_1, y0: y0_1};

  // ---------------- shared state memories ----------------
  // the decoder in its lower half writes, the other one reads the same word
  logic [NS*NSM-1:0] bmem_wdata [2], amem_wdata [2];
  logic [NS*NSM-1:0] bmem_w, amem_w, bmem_rdata, amem_rdata;
  logic              wr_sel;       // decoder that is in its lower half
  logic              mem_en;

  assign wr_sel = ctl[0].upper;
  assign bmem_w = bmem_wdata[wr_sel];
  assign amem_w = amem_wdata[wr_sel];
  assign mem_en = in_valid && (wr_sel ? in1_accept : 1'b1);

  reversal_memory #(.L(H), .W(NS*NSM)) u_bmem (
    .clk, .en(mem_en), .addr(HW'(ctl[0].bmem_addr)), .wdata(bmem_w), .rdata(bmem_rdata)
  );

  reversal_memory #(.L(H), .W(NS*NSM)) u_amem (
    .clk, .en(mem_en), .addr(HW'(ctl[0].bmem_addr)), .wdata(amem_w), .rdata(amem_rdata)
  );

  // ---------------- two decoders ----------------
  logic                  out_valid [2], bit_out [2];
  logic signed [NSM-1:0] llr       [2];

  for (genvar d = 0; d < 2; d++) begin : g_dec
    schedule_controller_na2 #(.L(L)) u_ctl (.clk, .rst_n, .en(en[d]), .ctl(ctl[d]));

    logic [2:0]    rd_bank [3];
    logic [AW-1:0] rd_addr [3];
    sym_t          rd_sym  [3];

    assign rd_bank[RD_B1] = ctl[d].b1_bank;
    assign rd_bank[RD_B2] = ctl[d].b2_bank;
    assign rd_bank[RD_A]  = ctl[d].b2_bank;
    assign rd_addr[RD_B1] = AW'(ctl[d].rev_addr);
    assign rd_addr[RD_B2] = AW'(ctl[d].rev_addr);
    assign rd_addr[RD_A]  = AW'(ctl[d].fwd_addr);

    symbol_buffer #(.L(L), .NBANK(5), .NRD(3)) u_symbuf (
      .clk, .wr_en(en[d]), .wr_bank(ctl[d].wr_bank), .wr_addr(AW'(ctl[d].fwd_addr)),
      .wr_data(sym_in[d]), .rd_bank, .rd_addr, .rd_data(rd_sym)
    );

    bm_vec_t bm_b1, bm_b2, bm_a;
    branch_metric_unit u_bmu_b1 (.sym(rd_sym[RD_B1]), .bm(bm_b1));
    branch_metric_unit u_bmu_b2 (.sym(rd_sym[RD_B2]), .bm(bm_b2));
    branch_metric_unit u_bmu_a  (.sym(rd_sym[RD_A]),  .bm(bm_a));

    sm_vec_t zero_vec, b1_seed, b2_cur, a_cur, b_rev, a_rev;

    always_comb
      for (int s = 0; s < NS; s++) begin
        zero_vec[s]                 = '0;
        bmem_wdata[d][s*NSM +: NSM] = b2_cur[s];
        amem_wdata[d][s*NSM +: NSM] = a_cur[s];
        b_rev[s]                    = bmem_rdata[s*NSM +: NSM];
        a_rev[s]                    = amem_rdata[s*NSM +: NSM];
      end

    recursion_unit #(.FORWARD(1'b0)) u_ru_b1 (
      .clk, .rst_n, .en(en[d]), .load(ctl[d].b1_load), .init(zero_vec), .bm(bm_b1),
      .sm_cur(), .sm_reg(b1_seed), .dec(), .ofs()
    );

    recursion_unit #(.FORWARD(1'b0)) u_ru_b2 (
      .clk, .rst_n, .en(en[d]), .load(ctl[d].b2_load), .init(b1_seed), .bm(bm_b2),
      .sm_cur(b2_cur), .sm_reg(), .dec(), .ofs()
    );

    recursion_unit #(.FORWARD(1'b1)) u_ru_a (
      .clk, .rst_n, .en(en[d] && ctl[d].a1_run), .load(ctl[d].a1_load), .init(A_INIT),
      .bm(bm_a), .sm_cur(a_cur), .sm_reg(), .dec(), .ofs()
    );

    logic signed [NSM-1:0] llr_up, llr_lo, llr_up_q, llr_lo_q, llr_out;
    logic                  llr_we;

    llr_unit u_llr_up (.a(a_cur), .b(b_rev), .bm(bm_a),  .llr(llr_up));
    llr_unit u_llr_lo (.a(a_rev), .b(b2_cur), .bm(bm_b2), .llr(llr_lo));

    assign llr_we = en[d] && ctl[d].upper && ctl[d].a1_run;

    reversal_memory #(.L(H), .W(NSM)) u_llr_up_mem (
      .clk, .en(llr_we), .addr(HW'(ctl[d].half_addr)), .wdata(llr_up), .rdata(llr_up_q)
    );

    reversal_memory #(.L(H), .W(NSM)) u_llr_lo_mem (
      .clk, .en(llr_we),
      .addr(ctl[d].upper ? HW'(HW'(H - 1) - HW'(ctl[d].half_addr)) : HW'(ctl[d].half_addr)),
      .wdata(llr_lo), .rdata(llr_lo_q)
    );

    assign llr_out = ctl[d].upper ? llr_up_q : llr_lo_q;

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        out_valid[d] <= 1'b0;
        llr[d]       <= '0;
        bit_out[d]   <= 1'b0;
      end else begin
        out_valid[d] <= en[d] && ctl[d].a2_run;
        if (en[d]) begin
          llr[d]     <= llr_out;
          bit_out[d] <= (llr_out > 0);
        end
      end
  end

  assign out_valid_0 = out_valid[0];
  assign llr_0       = llr[0];
  assign bit_out_0   = bit_out[0];
  assign out_valid_1 = out_valid[1];
  assign llr_1       = llr[1];
  assign bit_out_1   = bit_out[1];

endmodule
