// map_decoder_top: the sliding-window log-MAP decoders side by side on one input stream.
//
// All of them decode the same rate-1/2 (7,5) recursive systematic code, one symbol per enabled
// clock, with OACS recursion units and convergence length L:
//   * map_decoder_nb2, the (n_A = 1, n_B = 2, M_A) schedule: 3 recursion units, L stored
//     forward vectors plus an L-entry LLR reordering memory, latency 4L;
//   * map_decoder_nb3, the (n_A = 1, n_B = 3, M_B) schedule: 4 recursion units, L/2 stored
//     backward vectors, no LLR reordering, latency 3L;
//   * map_decoder_pt, the pointer-based (n_A = 1, n_B = 3, M_B, Pt_B) schedule: 4 recursion
//     units, 3 pointer vectors plus L/4 stored backward vectors, latency 4L, and the same
//     LLR values as map_decoder_nb2;
//   * map_decoder_mab, the (n_A = 1, n_B = 2, M_(A+B)/2) schedule: 3 recursion units, L/2
//     stored forward and L/2 stored backward vectors, two LLR units, latency 4L, and the
//     same LLR values as map_decoder_nb2;
//   * map_decoder_mab_pair, two decoders of the same schedule that share their state
//     memories: its first decoder takes the shared stream, its second a second stream
//     (pair1_y0, pair1_y1, pair1_punct, taken while pair1_accept is high), latency 4L;
//   * map_decoder_na2, the (n_A = 2, n_B = 2, M_B) schedule: 3 full recursion units plus a
//     forward unit of simplified ACSO elements that replays the first one, L/2 stored
//     backward vectors, latency 4L, and the same LLR values as map_decoder_nb2.
// They trade recursion units against memory and latency; each can be used on its own. The
// inputs are shared (apart from the pair's second stream), each decoder has its own output
// group. Outputs are in natural order;
// nb2_*, mab_*, pair0_*, pair1_*, pt_* and na2_* appear 4L + 1 clocks and nb3_* 3L + 1
// clocks (counting enabled cycles, for pair1_* those with pair1_accept high) after the symbol. in_valid = 0 stalls all of them.
module map_decoder_top
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
  output logic                  nb2_valid,
  output logic signed [NSM-1:0] nb2_llr,
  output logic                  nb2_bit,
  output logic                  mab_valid,
  output logic signed [NSM-1:0] mab_llr,
  output logic                  mab_bit,
  input  ysoft_t                pair1_y0,
  input  ysoft_t                pair1_y1,
  input  logic [1:0]            pair1_punct,
  output logic                  pair1_accept,
  output logic                  pair0_valid,
  output logic signed [NSM-1:0] pair0_llr,
  output logic                  pair0_bit,
  output logic                  pair1_valid,
  output logic signed [NSM-1:0] pair1_llr,
  output logic                  pair1_bit,
  output logic                  nb3_valid,
  output logic signed [NSM-1:0] nb3_llr,
  output logic                  nb3_bit,
  output logic                  pt_valid,
  output logic signed [NSM-1:0] pt_llr,
  output logic                  pt_bit,
  output logic                  na2_valid,
  output logic signed [NSM-1:0] na2_llr,
  output logic                  na2_bit
);

  map_decoder_nb2 #(.L(L), .A_INIT(A_INIT)) u_nb2 (
    .clk, .rst_n, .in_valid, .y0, .y1, .punct,
    .out_valid(nb2_valid), .llr(nb2_llr), .bit_out(nb2_bit)
  );

  map_decoder_mab #(.L(L), .A_INIT(A_INIT)) u_mab (
    .clk, .rst_n, .in_valid, .y0, .y1, .punct,
    .out_valid(mab_valid), .llr(mab_llr), .bit_out(mab_bit)
  );

  map_decoder_mab_pair #(.L(L), .A_INIT(A_INIT)) u_pair (
    .clk, .rst_n, .in_valid, .y0_0(y0), .y1_0(y1), .punct_0(punct), .y0_1(pair1_y0),
    .y1_1(pair1_y1), .punct_1(pair1_punct), .in1_accept(pair1_accept),
    .out_valid_0(pair0_valid), .llr_0(pair0_llr), .bit_out_0(pair0_bit),
    .out_valid_1(pair1_valid), .llr_1(pair1_llr), .bit_out_1(pair1_bit)
  );

  map_decoder_nb3 #(.L(L), .A_INIT(A_INIT)) u_nb3 (
    .clk, .rst_n, .in_valid, .y0, .y1, .punct,
    .out_valid(nb3_valid), .llr(nb3_llr), .bit_out(nb3_bit)
  );

  map_decoder_pt #(.L(L), .A_INIT(A_INIT)) u_pt (
    .clk, .rst_n, .in_valid, .y0, .y1, .punct,
    .out_valid(pt_valid), .llr(pt_llr), .bit_out(pt_bit)
  );

  map_decoder_na2 #(.L(L), .A_INIT(A_INIT)) u_na2 (
    .clk, .rst_n, .in_valid, .y0, .y1, .punct,
    .out_valid(na2_valid), .llr(na2_llr), .bit_out(na2_bit)
  );

endmodule
