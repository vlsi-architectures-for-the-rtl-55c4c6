// maxstar: two-operand MAX* operator, MAX*(x,y) = max(x,y) + ln(1 + exp(-|x-y|)).
//
// Operands are modulo-2^NSM state-metric sums. The comparison is a subtraction x - y whose
// sign bit drives the select multiplexer (as in the compare-select of an ACS), the magnitude
// of the same difference addresses the correction table, and the correction is added to the
// selected operand. Because the difference is taken modulo 2^NSM the result is correct
// whenever the true |x - y| < 2^(NSM-1). Ties select x. Purely combinational; used as the node
// of the MAX* trees in the LLR unit.
module maxstar
  import map_pkg::*;
#(
  parameter int W = NSM
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] z
);

  logic [W-1:0] diff, absdiff, sel;
  ofs_t         ofs;

  always_comb begin
    diff    = x - y;
    absdiff = diff[W-1] ? (~diff + 1'b1) : diff;
    sel     = diff[W-1] ? y : x;
  end

  maxstar_lut #(.W(W)) u_lut (.absdiff(absdiff), .offset(ofs));

  assign z = sel + W'(ofs);

endmodule
