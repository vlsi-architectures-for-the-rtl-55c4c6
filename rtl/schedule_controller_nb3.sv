// schedule_controller_nb3: timing of the (n_A = 1, n_B = 3, M_B) sliding-window schedule.
//
// Time is cut into half-segments of H = L/2 enabled cycles; j counts inside one, S counts
// them (modulo 8 for the symbol banks, modulo 3 for the backward units). A new backward
// recursion starts every H cycles and runs 3H = L + L/2 steps, so three backward units are
// always busy, one in each phase:
//   phase 0 (unit (S) mod 3):   half-block S-1, from the all-zero vector (convergence);
//   phase 1 (unit (S-1) mod 3): half-block S-3 (convergence continues, L steps in all);
//   phase 2 (unit (S-2) mod 3): half-block S-5, its vectors B are written to the B memory.
// RU_A runs forwards over half-block S-6 and reads the B vectors written in the previous
// half-segment in reverse order through the same up/down address trick as the other
// decoder. A fill counter keeps the units idle until their data exist: B vectors are valid
// from half-segment 5, RU_A (taking the initial vector) and the output from half-segment 6.
// Latency is 6H = 3L. Outputs are functions of the registered counters; en advances.
// The restart period, run length, the number of units and the B memory size follow the
// document; counter layout, fill logic and reset are this design's choices.
module schedule_controller_nb3
  import map_pkg::*;
#(
  parameter int L = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output sched3_ctl_t ctl
);

  localparam int H  = L / 2;
  localparam int AW = $clog2(H);

  logic [AW-1:0] j;
  logic [2:0]    s8;          // half-segment number modulo 8
  logic [1:0]    s3;          // half-segment number modulo 3
  logic [2:0]    fill;        // completed half-segments, saturating at 6
  logic          dir;         // 0: B memory counts up, 1: down

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      j    <= '0;
      s8   <= '0;
      s3   <= '0;
      fill <= '0;
      dir  <= 1'b0;
    end else if (en) begin
      if (j == AW'(H-1)) begin
        j   <= '0;
        s8  <= s8 + 3'd1;
        s3  <= (s3 == 2'd2) ? 2'd0 : s3 + 2'd1;
        dir <= ~dir;
        if (fill != 3'd6) fill <= fill + 3'd1;
      end else begin
        j <= j + 1'b1;
      end
    end

  a_j_range:  assert property (@(posedge clk) disable iff (!rst_n) j <= AW'(H-1));
  a_s3_range: assert property (@(posedge clk) disable iff (!rst_n) s3 <= 2'd2);

  // phase of backward unit u: (S - u) mod 3
  function automatic logic [1:0] phase_of(logic [1:0] s, int u);
    int p;
    p = (int'(s) - u + 3) % 3;
    return p[1:0];
  endfunction

  logic a_started;             // RU_A has taken its initial vector

  always_comb begin
    ctl           = '0;
    ctl.wr_bank   = s8;
    ctl.a_bank    = s8 - 3'd6;
    ctl.fwd_addr  = 16'(j);
    ctl.rev_addr  = 16'(AW'(H-1) - j);
    ctl.bmem_addr = dir ? ctl.rev_addr : ctl.fwd_addr;
    ctl.seg_start = (j == '0);
    for (int u = 0; u < 3; u++) begin
      ctl.b_bank[u] = s8 - 3'd1 - {phase_of(s3, u), 1'b0};
      ctl.b_load[u] = ctl.seg_start && (phase_of(s3, u) == 2'd0);
      if (phase_of(s3, u) == 2'd2) ctl.gen_unit = 2'(u);
    end
    ctl.bmem_we   = (fill >= 3'd5);
    ctl.a_run     = (fill == 3'd6);
    ctl.a_load    = ctl.seg_start && (fill == 3'd6) && !a_started;
  end

  // RU_A takes the initial vector once, at the first step of its first half-segment
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                           a_started <= 1'b0;
    else if (en && ctl.a_run)             a_started <= 1'b1;

endmodule
