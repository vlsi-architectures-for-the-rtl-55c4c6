// tb_forward_copy_unit: checks that a forward_copy_unit replays a forward recursion_unit.
// Phase 1 runs the recursion_unit over 2000 random branch-metric vectors, with random stalls
// and two restarts from random start vectors, and records per step its sm_cur, decisions,
// offsets, branch metrics and load/init. Phase 2 feeds the recorded decisions, offsets,
// branch metrics and load/init to the forward_copy_unit, again with random stalls, and
// requires its sm_cur to equal the recorded sm_cur at every step. Both decision values must
// have occurred.
module tb_forward_copy_unit;
  import map_pkg::*;
  localparam int N = 2000;
  int checks = 0, failures = 0, n_dec1 = 0, n_dec0 = 0;
  logic clk = 0, rst_n = 0, en = 0, load = 0, cen = 0, cload = 0;
  sm_vec_t init, cinit, o_cur, c_cur;
  bm_vec_t bm, cbm;
  logic [NS-1:0] dec, cdec;
  ofs_t [NS-1:0] ofs, cofs;

  recursion_unit #(.FORWARD(1'b1)) u_orig (
    .clk, .rst_n, .en, .load, .init, .bm, .sm_cur(o_cur), .sm_reg(), .dec, .ofs
  );
  forward_copy_unit u_copy (
    .clk, .rst_n, .en(cen), .load(cload), .init(cinit), .bm(cbm), .dec(cdec), .ofs(cofs),
    .sm_cur(c_cur)
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sm_vec_t       h_cur  [N];
  sm_vec_t       h_init [N];
  bm_vec_t       h_bm   [N];
  logic [NS-1:0] h_dec  [N];
  ofs_t [NS-1:0] h_ofs  [N];
  logic          h_load [N];

  initial begin
    int k;
    for (int s = 0; s < NS; s++) begin init[s] = '0; cinit[s] = '0; end
    for (int c = 0; c < 4; c++) begin bm[c] = '0; cbm[c] = '0; end
    cdec = '0; cofs = '0;
    @(negedge clk);
    rst_n = 1;
    k = 0;
    while (k < N) begin
      @(negedge clk);
      en   = ($urandom_range(0, 4) != 0);
      load = (k == 0) || (k == 700) || (k == 1400);
      for (int s = 0; s < NS; s++) init[s] = sm_t'($urandom);
      for (int c = 0; c < 4; c++) bm[c] = bm_t'($urandom_range(0, 252) - 126);
      #1;
      if (en) begin
        h_cur[k] = o_cur; h_init[k] = init; h_bm[k] = bm;
        h_dec[k] = dec; h_ofs[k] = ofs; h_load[k] = load;
        for (int s = 0; s < NS; s++) if (dec[s]) n_dec1++; else n_dec0++;
        k++;
      end
    end
    @(negedge clk);
    en = 0;
    k = 0;
    while (k < N) begin
      @(negedge clk);
      cen   = ($urandom_range(0, 4) != 0);
      cinit = h_init[k]; cbm = h_bm[k]; cdec = h_dec[k]; cofs = h_ofs[k]; cload = h_load[k];
      #1;
      if (cen) begin
        for (int s = 0; s < NS; s++) begin
          checks++;
          if (c_cur[s] != h_cur[k][s]) begin
            failures++;
            if (failures < 10) $display("k=%0d s=%0d copy=%0d orig=%0d", k, s, c_cur[s], h_cur[k][s]);
          end
        end
        k++;
      end
    end
    checks++; if (n_dec0 == 0 || n_dec1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
