// oacs_unit: Offset-Add-Compare-Select processing element of a state-metric recursion.
//
// The MAX* recursion A_k(s) = MAX*(A_{k-1}(s'0)+G0, A_{k-1}(s'1)+G1) is cut at the point where
// the correction (offset) has been computed but not yet added. Each element therefore holds
// two registers: m = A_k(s) - offset (the selected sum) and o = offset (3 bits). In the next
// step the offset of each predecessor is added first, then its branch metric, the two sums
// are compared by subtraction, the sign selects the larger sum into m, and the LUT output on
// the magnitude of the difference goes into o. The loop then holds one carry-propagate adder
// plus two adder delays and a LUT/mux, instead of the two carry-propagate adders of the
// classical add-compare-select-offset ordering. The full metric is m + o.
// All arithmetic is modulo 2^NSM (see map_pkg). Register placement and dataflow follow the
// document; the asynchronous active-low reset to zero is this design's choice.
// The decision (which predecessor won) and the offset of the current step are also brought
// out, combinationally, so that a simplified copy of the forward recursion can replay them.
// Timing: one recursion step per clock with en = 1; m and o are the registers, dec and
// ofs belong to the step being computed.
module oacs_unit
  import map_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  sm_t  m0,       // predecessor 0: metric without its offset
  input  ofs_t o0,       // predecessor 0: offset
  input  bm_t  g0,       // branch metric predecessor 0 -> s
  input  sm_t  m1,
  input  ofs_t o1,
  input  bm_t  g1,
  output sm_t  m,        // A_k(s) - offset_k(s)
  output ofs_t o,        // offset_k(s)
  output logic dec,      // this step: 1 when predecessor 1 is selected
  output ofs_t ofs       // this step: offset going into o
);

  sm_t  s0, s1, diff, absdiff, sel;
  ofs_t ofs_next;

  always_comb begin
    s0      = m0 + NSM'(o0) + NSM'(g0);     // offset-add, then branch-metric add
    s1      = m1 + NSM'(o1) + NSM'(g1);
    diff    = s0 - s1;                      // compare
    absdiff = diff[NSM-1] ? (~diff + 1'b1) : diff;
    sel     = diff[NSM-1] ? s1 : s0;        // select
  end

  maxstar_lut u_lut (.absdiff(absdiff), .offset(ofs_next));

  assign dec = diff[NSM-1];
  assign ofs = ofs_next;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      m <= '0;
      o <= '0;
    end else if (en) begin
      m <= sel;
      o <= ofs_next;
    end

endmodule
