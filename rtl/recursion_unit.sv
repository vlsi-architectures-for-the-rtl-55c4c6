// recursion_unit: one forward (RU_A) or backward (RU_B) state-metric recursion unit.
//
// It holds NS = 2^NU OACS elements working in parallel, so one trellis step is done per
// enabled clock cycle. FORWARD = 1 computes A_{k+1}(s) = MAX*_{s'}(A_k(s') + G_k(s',s)) over
// the two predecessors s' of s; FORWARD = 0 computes B_k(s') = MAX*_s(B_{k+1}(s) + G_k(s',s))
// over the two successors s of s'. The trellis wiring is derived at elaboration from the code
// polynomials in map_pkg.
// load = 1 makes the step start from init instead of the registered vector (the all-zero
// vector for a convergence run, a seed handed over from another unit, or the initial forward
// vector). sm_cur is the vector the current step starts from, as full metrics (m + offset):
// with FORWARD = 1 that is A_k, with FORWARD = 0 it is B_{k+1}, the value the LLR unit and the
// state vector memory need in the same cycle. sm_reg is the registered vector (the result of
// the last step) regardless of load; it is how a converged vector is handed to another unit.
// dec and ofs are, per state, the decision and the offset of the step being computed (used
// by forward_copy_unit to replay a forward recursion).
// Timing: the registers update at the clock edge when en = 1.
module recursion_unit
  import map_pkg::*;
#(
  parameter bit FORWARD = 1'b1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  logic    load,
  input  sm_vec_t init,
  input  bm_vec_t bm,
  output sm_vec_t sm_cur,
  output sm_vec_t sm_reg,
  output logic [NS-1:0] dec,
  output ofs_t [NS-1:0] ofs
);

  sm_t  m_reg [NS];
  ofs_t o_reg [NS];
  sm_t  m_cur [NS];
  ofs_t o_cur [NS];

  always_comb
    for (int s = 0; s < NS; s++) begin
      m_cur[s]  = load ? init[s] : m_reg[s];
      o_cur[s]  = load ? '0 : o_reg[s];
      sm_cur[s] = m_cur[s] + NSM'(o_cur[s]);
      sm_reg[s] = m_reg[s] + NSM'(o_reg[s]);
    end

  for (genvar s = 0; s < NS; s++) begin : g_pe
    // neighbour i of state s: predecessor (forward) or successor (backward)
    localparam int N0  = FORWARD ? pred_state(s, 0) : next_state(s, 0);
    localparam int N1  = FORWARD ? pred_state(s, 1) : next_state(s, 1);
    localparam int CW0 = FORWARD ? branch_cw(N0, pred_input(s, 0)) : branch_cw(s, 0);
    localparam int CW1 = FORWARD ? branch_cw(N1, pred_input(s, 1)) : branch_cw(s, 1);

    oacs_unit u_pe (
      .clk, .rst_n, .en,
      .m0(m_cur[N0]), .o0(o_cur[N0]), .g0(bm[CW0]),
      .m1(m_cur[N1]), .o1(o_cur[N1]), .g1(bm[CW1]),
      .m(m_reg[s]),   .o(o_reg[s]),
      .dec(dec[s]),   .ofs(ofs[s])
    );
  end

endmodule
