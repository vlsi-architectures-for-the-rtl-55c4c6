// schedule_controller_na2: timing of the (n_A = 2, n_B = 2, M_B) sliding-window schedule.
//
// Time is cut into segments of L enabled cycles (step j, segment number modulo 5), each
// split into a lower half (j < L/2) and an upper half. In segment T:
//   * block T is written into bank T mod 5;
//   * RU_B1 runs backwards over block T-1 from the all-zero vector (convergence);
//   * RU_B2 runs backwards over block T-3 from RU_B1's final vector and stores every B
//     vector in the B memory;
//   * RU_A1 runs forwards over the same block T-3. The two units meet in the middle: in the
//     upper half RU_A1 reaches the upper-half symbols, whose B vectors RU_B2 stored in the
//     lower half, so their LLRs are computed now. Its decisions and offsets are stored;
//   * RU_A2 replays RU_A1 one segment later over block T-4. In the lower half it delivers the
//     A vectors of the lower-half symbols, whose B vectors RU_B2 stored in the upper half of
//     segment T-1, and their LLRs are computed then.
// The B memory (L/2 vectors) reads and writes one address that counts up and down in
// alternate halves, reversing each half-block. The upper-half LLRs wait L cycles in a delay
// memory of L/2 words, so all LLRs leave in natural order, 4L after their symbol.
// A fill counter starts RU_B2 and RU_A1 in segment 3 and RU_A2 and the output in segment 4.
// map_decoder_mab and map_decoder_mab_pair use the same controller; they have no RU_A2
// and use a2_run only to start their output.
// Unit roles, the meeting in the middle, the L/2 memory and the L-cycle copy delay follow
// the document; counters, fill logic, the LLR delay memory and reset are this design's.
module schedule_controller_na2
  import map_pkg::*;
#(
  parameter int L = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  output sched_na2_ctl_t ctl
);

  localparam int AW = $clog2(L);
  localparam int H  = L / 2;
  localparam int HW = $clog2(H);

  logic [AW-1:0] j;
  logic [2:0]    seg;          // segment number modulo 5
  logic [2:0]    fill;         // completed segments, saturating at 5
  logic          hdir;         // B memory counts up (0) or down (1) in this half

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      j    <= '0;
      seg  <= '0;
      fill <= '0;
      hdir <= 1'b0;
    end else if (en) begin
      if (j[HW-1:0] == HW'(H-1)) hdir <= ~hdir;
      if (j == AW'(L-1)) begin
        j   <= '0;
        seg <= (seg == 3'd4) ? 3'd0 : seg + 3'd1;
        if (fill != 3'd5) fill <= fill + 3'd1;
      end else begin
        j <= j + 1'b1;
      end
    end

  a_j_range:   assert property (@(posedge clk) disable iff (!rst_n) j <= AW'(L-1));
  a_seg_range: assert property (@(posedge clk) disable iff (!rst_n) seg <= 3'd4);

  function automatic logic [2:0] bank_minus(logic [2:0] s, int d);
    return 3'((int'(s) + 5 - d) % 5);
  endfunction

  always_comb begin
    ctl           = '0;
    ctl.wr_bank   = seg;
    ctl.b1_bank   = bank_minus(seg, 1);
    ctl.b2_bank   = bank_minus(seg, 3);
    ctl.a2_bank   = bank_minus(seg, 4);
    ctl.fwd_addr  = 16'(j);
    ctl.rev_addr  = 16'(AW'(L-1) - j);
    ctl.half_addr = 16'(j[HW-1:0]);
    ctl.bmem_addr = hdir ? 16'(HW'(H-1) - j[HW-1:0]) : 16'(j[HW-1:0]);
    ctl.upper     = j[AW-1];
    ctl.seg_start = (j == '0);
    ctl.b1_load   = ctl.seg_start;
    ctl.b2_load   = ctl.seg_start;
    ctl.bmem_we   = (fill >= 3'd3);
    ctl.a1_run    = (fill >= 3'd3);
    ctl.a1_load   = ctl.seg_start && (fill == 3'd3);
    ctl.a2_run    = (fill >= 3'd4);
    ctl.a2_load   = ctl.seg_start && (fill == 3'd4);
  end

endmodule
