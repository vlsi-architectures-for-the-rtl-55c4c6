// map_pkg: types, constants and trellis functions shared by the log-MAP decoder.
//
// Number format: every soft value is a two's-complement fixed-point number with FRAC = 3
// fraction bits (quantum 0.125). Received values y^i/sigma^2 are Y_W = 7 bits (-7.875 ..
// 7.875), branch metrics BM_W = 8 bits (-15.75 .. 15.75), state metrics and LLRs NSM bits.
// State metrics use modulo-2^NSM arithmetic: they are never rescaled, and every comparison is
// made on the wrapped difference of two metrics, which is exact as long as the true
// difference stays below 2^(NSM-1) quanta. NSM is this design's choice (see README).
//
// Code: rate-1/2 recursive systematic convolutional code with feedback polynomial 7 and
// feed-forward polynomial 5 (octal), NU = 2 memory cells, as in the worked example of the
// state-metric dynamic range. State s = {r1, r2}: r1 is the newest register bit. For input
// bit u: a = u ^ (FB taps on registers), c0 = u (systematic), c1 = parity from FF taps,
// next state = {a, r1}. Code bit 1 maps to +1, bit 0 to -1.
package map_pkg;

  localparam int NU      = 2;              // encoder memory
  localparam int NS      = 1 << NU;        // trellis states
  localparam int FRAC    = 3;              // fraction bits of every soft value
  localparam int Y_W     = 7;              // received soft value width
  localparam int BM_W    = Y_W + 1;        // branch metric width (sum of two inputs)
  localparam int NSM     = 12;             // state metric width, modulo 2^NSM
  localparam int OFS_W   = 3;              // MAX* correction width (ln 2 -> 0.75 = 6 quanta)
  localparam int LUT_AW  = 5;              // LUT address bits, |x-y| < 4.0 = 32 quanta
  localparam int FB_POLY = 32'o7;           // feedback polynomial, bit NU = input tap
  localparam int FF_POLY = 32'o5;           // parity polynomial, bit NU = input-node tap

  typedef logic signed [Y_W-1:0]  ysoft_t;
  typedef logic signed [BM_W-1:0] bm_t;
  typedef logic        [NSM-1:0]  sm_t;    // modulo state metric
  typedef logic        [OFS_W-1:0] ofs_t;

  // One received symbol: systematic and parity soft values, punctured flags.
  typedef struct packed {
    logic [1:0] punct;                     // punct[i] = 1: component i carries no energy
    ysoft_t     y1;
    ysoft_t     y0;
  } sym_t;

  typedef sm_t    sm_vec_t [NS];
  typedef bm_t    bm_vec_t [4];            // index {c0,c1}

  // Register contents of state s as the node value a = u ^ feedback.
  function automatic logic node_bit(int s, int u);
    logic a;
    a = u[0];
    for (int i = 0; i < NU; i++)           // register i+1 is bit NU-1-i of s
      if (FB_POLY[NU-1-i]) a ^= s[NU-1-i];
    return a;
  endfunction

  function automatic int next_state(int s, int u);
    return (int'(node_bit(s, u)) << (NU-1)) | (s >> 1);
  endfunction

  function automatic int parity_bit(int s, int u);
    logic p;
    p = FF_POLY[NU] ? node_bit(s, u) : 1'b0;
    for (int i = 0; i < NU; i++)
      if (FF_POLY[NU-1-i]) p ^= s[NU-1-i];
    return int'(p);
  endfunction

  // Code word index {c0,c1} of the branch leaving s with input u.
  function automatic int branch_cw(int s, int u);
    return (u << 1) | parity_bit(s, u);
  endfunction

  // i-th (i = 0, 1) predecessor state of s, in increasing state order.
  function automatic int pred_state(int s, int i);
    int n;
    n = 0;
    for (int p = 0; p < NS; p++)
      for (int u = 0; u < 2; u++)
        if (next_state(p, u) == s) begin
          if (n == i) return p;
          n++;
        end
    return 0;
  endfunction

  // Input bit on the branch p -> s (valid when p is a predecessor of s).
  function automatic int pred_input(int s, int i);
    int p;
    p = pred_state(s, i);
    return (next_state(p, 1) == s) ? 1 : 0;
  endfunction

  // Schedule controls, one set per enabled cycle (see schedule_controller).
  typedef struct packed {
    logic [1:0] wr_bank;       // bank receiving the incoming block
    logic [1:0] b1_bank;       // bank read backwards by RU_B1
    logic [1:0] a_bank;        // bank read forwards by RU_A
    logic [1:0] b2_bank;       // bank read backwards by RU_B2
    logic [15:0] fwd_addr;     // j: address counting up inside the segment
    logic [15:0] rev_addr;     // L-1-j: address counting down inside the segment
    logic [15:0] svm_addr;     // up/down address of the reversal memories
    logic b1_load;             // first step of a segment: RU_B1 restarts from zero
    logic b2_load;             // first step of a segment: RU_B2 takes RU_B1's vector
    logic a_load;              // very first forward step: RU_A takes the initial vector
    logic a_run;               // RU_A has data (second segment onwards)
    logic llr_run;             // RU_B2 / LLR unit have data (fourth segment onwards)
    logic out_run;             // reordered LLRs are valid (fifth segment onwards)
    logic seg_start;           // j == 0
  } sched_ctl_t;

  // Schedule controls of the (n_A = 1, n_B = 3, M_B) decoder (see schedule_controller_nb3).
  // Time is cut into half-segments of L/2 cycles; backward unit u is in phase
  // (half-segment - u) mod 3.
  typedef struct packed {
    logic [2:0]      wr_bank;   // bank receiving the incoming half-block S
    logic [2:0][2:0] b_bank;    // per backward unit: half-block S-1, S-3 or S-5 by phase
    logic [2:0]      a_bank;    // half-block S-6, read forwards by RU_A
    logic [15:0]     fwd_addr;  // j
    logic [15:0]     rev_addr;  // L/2-1-j
    logic [15:0]     bmem_addr; // up/down address of the B vector memory
    logic [2:0]      b_load;    // per backward unit: restart from the all-zero vector
    logic [1:0]      gen_unit;  // backward unit in its third phase (writes B vectors)
    logic            bmem_we;   // B vectors are valid (half-segment 5 onwards)
    logic            a_load;    // first forward step: RU_A takes the initial vector
    logic            a_run;     // RU_A and the LLR unit have data (half-segment 6 onwards)
    logic            seg_start; // j == 0
  } sched3_ctl_t;

  // Schedule controls of the pointer-based (n_A = 1, n_B = 3, M_B, Pt_B) decoder (see
  // schedule_controller_pt). Segments of L cycles, quarters of L/4; five symbol banks.
  typedef struct packed {
    logic [2:0]  wr_bank;   // bank receiving block T
    logic [2:0]  b1_bank;   // block T-1, RU_B1 (from zero)
    logic [2:0]  b2_bank;   // block T-3, RU_B2 (seeded by RU_B1)
    logic [2:0]  a_bank;    // block T-4, RU_B3 (from pointers) and RU_A
    logic [15:0] fwd_addr;  // j
    logic [15:0] rev_addr;  // L-1-j
    logic [15:0] b3_addr;   // symbol of block T-4 processed by RU_B3
    logic [15:0] bmem_addr; // up/down address of the L/4-vector B memory
    logic        b1_load;   // j == 0
    logic        b2_load;   // j == 0
    logic        b3_load;   // RU_B3 restarts from a pointer (first step of quarters 0..2)
    logic        b3_gen;    // B memory is written from RU_B3 (quarters 0..2), else RU_B2
    logic        seed_we;   // RU_B2 reaches a pointer position (j = 0, L/4, L/2)
    logic [1:0]  seed_slot; // pointer register read by RU_B3 and rewritten by RU_B2
    logic        bmem_we;   // B vectors are valid (segment 3 onwards)
    logic        a_load;    // first forward step: RU_A takes the initial vector
    logic        a_run;     // RU_A and the LLR unit have data (segment 4 onwards)
    logic        seg_start; // j == 0
  } sched_pt_ctl_t;

  // Schedule controls of the (n_A = 2, n_B = 2, M_B) decoder (see schedule_controller_na2).
  // Segments of L cycles, each in two halves of L/2; five symbol banks.
  typedef struct packed {
    logic [2:0]  wr_bank;   // bank receiving block T
    logic [2:0]  b1_bank;   // block T-1, RU_B1 (from zero)
    logic [2:0]  b2_bank;   // block T-3, RU_B2 backwards and RU_A1 forwards
    logic [2:0]  a2_bank;   // block T-4, RU_A2 forwards
    logic [15:0] fwd_addr;  // j
    logic [15:0] rev_addr;  // L-1-j
    logic [15:0] bmem_addr; // up/down address of the L/2-vector B memory
    logic [15:0] half_addr; // j mod L/2, address of the LLR delay memory
    logic        upper;     // second half of the segment (j >= L/2)
    logic        b1_load;   // j == 0
    logic        b2_load;   // j == 0
    logic        bmem_we;   // RU_B2 has data (segment 3 onwards)
    logic        a1_load;   // first step of RU_A1: initial vector
    logic        a1_run;    // RU_A1 has data (segment 3 onwards)
    logic        a2_load;   // first step of RU_A2: initial vector
    logic        a2_run;    // RU_A2 and the output have data (segment 4 onwards)
    logic        seg_start; // j == 0
  } sched_na2_ctl_t;

endpackage
