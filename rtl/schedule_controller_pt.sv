// schedule_controller_pt: timing of the pointer-based (n_A = 1, n_B = 3, M_B, Pt_B) schedule.
//
// Time is cut into segments of L enabled cycles (step j, segment number modulo 5) and each
// segment into four quarters of Q = L/4 steps (quarter qq, step jj). In segment T:
//   * block T is written into bank T mod 5;
//   * RU_B1 runs backwards over block T-1 from the all-zero vector (convergence);
//   * RU_B2 runs backwards over block T-3 from RU_B1's final vector. At j = 0, Q and 2Q it
//     reaches B at the top of quarters 3, 2 and 1 of that block; these three vectors are
//     saved as pointers. In quarter 3 it processes quarter 0 itself, and its vectors go
//     straight into the B memory;
//   * RU_B3, in quarters 0, 1 and 2, restarts from the pointer of quarter qq+1 of block T-4
//     and recomputes that quarter backwards into the B memory;
//   * RU_A runs forwards over block T-4 and reads, in quarter qq, the B vectors of quarter qq
//     written in the quarter before, so the LLRs appear in natural order, 4L after input.
// Pointer bookkeeping: in each of the quarters 0..2 one pointer of block T-4 is consumed and
// one of block T-3 saved, at the same step. Three registers therefore suffice. The quarter-2
// pointer always uses register 1. The other two registers swap roles every segment: the one
// holding block T-4's quarter-1 pointer (read at j = 0) receives block T-3's quarter-3
// pointer, and the one holding block T-4's quarter-3 pointer (read at j = 2Q) receives block
// T-3's quarter-1 pointer. The B memory address counts up and down in alternate quarters.
// A fill counter keeps outputs invalid until segment 4; en advances the schedule.
// Unit roles, the pointer spacing of L/4, the three pointers and the L/4 memory follow the
// document; the register allocation, counters, fill logic and reset are this design's own.
module schedule_controller_pt
  import map_pkg::*;
#(
  parameter int L = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output sched_pt_ctl_t ctl
);

  localparam int AW = $clog2(L);
  localparam int Q  = L / 4;
  localparam int QW = $clog2(Q);

  logic [AW-1:0] j;
  logic [2:0]    seg;          // segment number modulo 5
  logic [2:0]    fill;         // completed segments, saturating at 5
  logic          dir;          // segment parity: selects the pointer register roles
  logic          qdir;         // B memory counts up (0) or down (1) in this quarter

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      j    <= '0;
      seg  <= '0;
      fill <= '0;
      dir  <= 1'b0;
      qdir <= 1'b0;
    end else if (en) begin
      if (j[QW-1:0] == QW'(Q-1)) qdir <= ~qdir;
      if (j == AW'(L-1)) begin
        j   <= '0;
        seg <= (seg == 3'd4) ? 3'd0 : seg + 3'd1;
        dir <= ~dir;
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

  logic [1:0]    qq;
  logic [QW-1:0] jj;

  always_comb begin
    qq = j[AW-1 -: 2];
    jj = j[QW-1:0];
    ctl           = '0;
    ctl.wr_bank   = seg;
    ctl.b1_bank   = bank_minus(seg, 1);
    ctl.b2_bank   = bank_minus(seg, 3);
    ctl.a_bank    = bank_minus(seg, 4);
    ctl.fwd_addr  = 16'(j);
    ctl.rev_addr  = 16'(AW'(L-1) - j);
    // quarter qq+1 of block T-4, backwards
    ctl.b3_addr   = 16'((int'(qq) + 2) * Q - 1 - int'(jj));
    ctl.bmem_addr = qdir ? 16'(QW'(Q-1) - jj) : 16'(jj);
    ctl.seg_start = (j == '0);
    ctl.b1_load   = ctl.seg_start;
    ctl.b2_load   = ctl.seg_start;
    ctl.b3_gen    = (qq != 2'd3);
    ctl.b3_load   = ctl.b3_gen && (jj == '0);
    ctl.seed_we   = ctl.b3_load;
    case (qq)
      2'd0:    ctl.seed_slot = dir ? 2'd2 : 2'd0;
      2'd1:    ctl.seed_slot = 2'd1;
      default: ctl.seed_slot = dir ? 2'd0 : 2'd2;
    endcase
    ctl.bmem_we   = (fill >= 3'd3);
    ctl.a_run     = (fill >= 3'd4);
    ctl.a_load    = ctl.seg_start && (fill == 3'd4);
  end

endmodule
