// maxstar_lut: correction term ln(1 + exp(-|x-y|)) of the MAX* operator.
//
// Input is |x-y| in quanta of 0.125 (unsigned, NSM bits). With three fraction bits the
// correction rounds to zero once |x-y| > 2.5, so a zero flag Z is raised when |x-y| reaches
// the next power of two, 4.0 (32 quanta), and the output is forced to 0. Below that the five
// least significant bits address a 32-entry table of 3-bit words: entry d holds
// round(8 * ln(1 + exp(-d/8))), i.e. the correction rounded to the nearest quantum (the
// largest, ln 2, becomes 0.75 = 6). The zero flag, the 5-bit address and the 3-bit word are
// the document's; rounding to nearest is this design's reading of it. Purely combinational.
module maxstar_lut
  import map_pkg::*;
#(
  parameter int W = NSM
) (
  input  logic [W-1:0]   absdiff,
  output ofs_t           offset
);

  logic z;                                  // |x-y| >= 4.0
  logic [LUT_AW-1:0] addr;

  assign z    = |absdiff[W-1:LUT_AW];
  assign addr = absdiff[LUT_AW-1:0];

  always_comb begin
    unique case (addr)
      5'd0:                         offset = 3'd6;
      5'd1, 5'd2:                   offset = 3'd5;
      5'd3, 5'd4:                   offset = 3'd4;
      5'd5, 5'd6, 5'd7, 5'd8:       offset = 3'd3;
      5'd9, 5'd10, 5'd11, 5'd12:    offset = 3'd2;
      5'd13, 5'd14, 5'd15, 5'd16,
      5'd17, 5'd18, 5'd19, 5'd20,
      5'd21:                        offset = 3'd1;
      default:                      offset = 3'd0;
    endcase
    if (z) offset = '0;
  end

endmodule
