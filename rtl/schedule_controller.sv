// schedule_controller: timing of the (n_A = 1, n_B = 2, M_A) sliding-window schedule.
//
// Time is cut into segments of L enabled cycles; j counts inside a segment and seg counts
// segments modulo 4. During segment T the incoming block T is written into bank T mod 4,
// RU_B1 runs backwards over block T-1 starting from the all-zero vector (convergence),
// RU_A runs forwards over block T-2 and stores each A vector in the state vector memory,
// and RU_B2 runs backwards over block T-3 starting from the vector RU_B1 reached at the end
// of segment T-1, while the LLR unit combines it with the A vectors read back in reverse
// order. In segment T+1 the LLRs of block T-3 are read back in natural order. The two
// reversal memories share one address that counts up in even segments and down in odd ones.
// A fill counter keeps each unit idle until its data exist: RU_A starts in segment 2 (taking
// the initial forward vector), the LLR path in segment 3 and the output in segment 4.
// All outputs are functions of the registered counters (Moore); en advances the schedule.
// The segment roles and the up/down address come from the document; the counter layout,
// fill logic and reset are this design's choices.
module schedule_controller
  import map_pkg::*;
#(
  parameter int L = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  output sched_ctl_t ctl
);

  localparam int AW = $clog2(L);

  logic [AW-1:0] j;
  logic [1:0]    seg;          // segment number modulo 4
  logic [2:0]    fill;         // completed segments, saturating at 4
  logic          dir;          // 0: reversal memories count up, 1: down

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      j    <= '0;
      seg  <= '0;
      fill <= '0;
      dir  <= 1'b0;
    end else if (en) begin
      if (j == AW'(L-1)) begin
        j   <= '0;
        seg <= seg + 2'd1;
        dir <= ~dir;
        if (fill != 3'd4) fill <= fill + 3'd1;
      end else begin
        j <= j + 1'b1;
      end
    end

  // the step counter never leaves its segment, and the fill counter saturates
  a_j_range: assert property (@(posedge clk) disable iff (!rst_n) j <= AW'(L-1));
  a_fill_sat: assert property (@(posedge clk) disable iff (!rst_n) fill <= 3'd4);

  always_comb begin
    ctl           = '0;
    ctl.wr_bank   = seg;
    ctl.b1_bank   = seg - 2'd1;
    ctl.a_bank    = seg - 2'd2;
    ctl.b2_bank   = seg - 2'd3;
    ctl.fwd_addr  = 16'(j);
    ctl.rev_addr  = 16'(AW'(L-1) - j);
    ctl.svm_addr  = dir ? ctl.rev_addr : ctl.fwd_addr;
    ctl.seg_start = (j == '0);
    ctl.b1_load   = ctl.seg_start;
    ctl.b2_load   = ctl.seg_start;
    ctl.a_run     = (fill >= 3'd2);
    ctl.a_load    = ctl.seg_start && (fill == 3'd2);
    ctl.llr_run   = (fill >= 3'd3);
    ctl.out_run   = (fill >= 3'd4);
  end

endmodule
