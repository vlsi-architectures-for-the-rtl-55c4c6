// simplified_acso_unit: one state of a forward recursion that replays decisions and offsets.
//
// A second forward unit that repeats, some cycles later, exactly the computation of a first
// one does not need to compare anything: the first unit's decision (which predecessor won)
// and its correction offset are stored and fed in here. The decision selects the
// predecessor's metric and the matching branch metric, the two are added, the stored offset
// is added, and the sum is registered: A_k(s) = A_{k-1}(s'_dec) + G_k(s'_dec, s) + offset.
// There is no subtractor and no look-up table, which roughly halves the element.
// The metric here is the full value (no separate offset register), modulo 2^NSM; given the
// same start vector it equals m + o of the OACS element it copies.
// Timing: one step per clock when en = 1; a is the register. load = 1 replaces the register
// with init at the clock edge instead (used to set the start vector).
// The dataflow (two multiplexers, two adders, register) follows the document's figure of the
// simplified unit; load and reset are this design's choices.
module simplified_acso_unit
  import map_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  sm_t  a0,       // A_{k-1}(s'0)
  input  sm_t  a1,       // A_{k-1}(s'1)
  input  bm_t  g0,       // G_k(s'0, s)
  input  bm_t  g1,       // G_k(s'1, s)
  input  logic dec,      // stored decision: 1 selects s'1
  input  ofs_t ofs,      // stored offset of this step
  output sm_t  a         // A_k(s)
);

  sm_t sel_a, sum;

  always_comb begin
    sel_a = dec ? a1 : a0;
    sum   = sel_a + NSM'(dec ? g1 : g0) + NSM'(ofs);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  a <= '0;
    else if (en) a <= sum;

endmodule
