// forward_copy_unit: forward recursion unit built from simplified ACSO elements.
//
// It recomputes the forward state metrics A_k of a forward recursion_unit that ran earlier
// over the same symbols, from that unit's stored per-step decisions and offsets: NS
// simplified_acso_unit elements, wired by the trellis like the forward recursion_unit, one
// step per enabled clock. load = 1 makes the step start from init (the same start vector the
// original unit used); sm_cur is then init, otherwise the registered vector. Given the same
// start vector, branch metrics, decisions and offsets, sm_cur equals the original unit's
// sm_cur step for step.
// Timing: as recursion_unit: sm_cur is A_k for the symbol of this step, registers update at
// the clock edge when en = 1.
// Replaying the first unit's decisions and offsets follows the document; the load input and
// the full-metric registers are this design's choices.
module forward_copy_unit
  import map_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          load,
  input  sm_vec_t       init,
  input  bm_vec_t       bm,
  input  logic [NS-1:0] dec,
  input  ofs_t [NS-1:0] ofs,
  output sm_vec_t       sm_cur
);

  sm_t a_reg [NS];

  always_comb
    for (int s = 0; s < NS; s++) sm_cur[s] = load ? init[s] : a_reg[s];

  for (genvar s = 0; s < NS; s++) begin : g_pe
    localparam int N0  = pred_state(s, 0);
    localparam int N1  = pred_state(s, 1);
    localparam int CW0 = branch_cw(N0, pred_input(s, 0));
    localparam int CW1 = branch_cw(N1, pred_input(s, 1));

    simplified_acso_unit u_pe (
      .clk, .rst_n, .en,
      .a0(sm_cur[N0]), .a1(sm_cur[N1]), .g0(bm[CW0]), .g1(bm[CW1]),
      .dec(dec[s]), .ofs(ofs[s]), .a(a_reg[s])
    );
  end

endmodule
