// tb_schedule_controller_pt: runs the controller of the pointer-based schedule with random
// stalls and checks, every enabled cycle, against a count kept here: bank rotation modulo 5
// (write T, RU_B1 T-1, RU_B2 T-3, RU_B3 and RU_A T-4), the forward, reverse and RU_B3
// addresses, the B memory address reversing each quarter, the RU_B3 restarts and pointer
// saves at the start of quarters 0..2, and the fill flags. It also models the three pointer
// registers by their contents (which block and quarter each holds) and checks that the
// register read at every RU_B3 restart holds the pointer of the quarter being recomputed,
// saved one segment earlier.
module tb_schedule_controller_pt;
  import map_pkg::*;
  int checks = 0, failures = 0;
  localparam int L = 16, Q = L / 4;
  logic clk = 0, rst_n = 0, en = 0;
  sched_pt_ctl_t ctl;

  schedule_controller_pt #(.L(L)) dut (.clk, .rst_n, .en, .ctl);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s got %0d exp %0d", what, got, exp);
    end
  endtask

  // content of each pointer register: block * 4 + quarter, -1 when empty
  int reg_tag [3] = '{-1, -1, -1};

  initial begin
    int n;
    n = 0;
    @(negedge clk);
    rst_n = 1;
    while (n < 40 * L) begin
      int t, j, qq, jj, qn;
      @(negedge clk);
      en = ($urandom_range(0, 5) != 0);
      #1;
      t = n / L; j = n % L; qq = j / Q; jj = j % Q; qn = n / Q;
      expect_eq("wr_bank", ctl.wr_bank, t % 5);
      expect_eq("b1_bank", ctl.b1_bank, (t + 4) % 5);
      expect_eq("b2_bank", ctl.b2_bank, (t + 2) % 5);
      expect_eq("a_bank", ctl.a_bank, (t + 1) % 5);
      expect_eq("fwd", int'(ctl.fwd_addr), j);
      expect_eq("rev", int'(ctl.rev_addr), L - 1 - j);
      if (qq < 3) expect_eq("b3_addr", int'(ctl.b3_addr), (qq + 2) * Q - 1 - jj);
      expect_eq("bmem", int'(ctl.bmem_addr), (qn % 2) ? Q - 1 - jj : jj);
      expect_eq("b1_load", ctl.b1_load, j == 0);
      expect_eq("b3_gen", ctl.b3_gen, qq < 3);
      expect_eq("b3_load", ctl.b3_load, qq < 3 && jj == 0);
      expect_eq("seed_we", ctl.seed_we, qq < 3 && jj == 0);
      expect_eq("bmem_we", ctl.bmem_we, t >= 3);
      expect_eq("a_run", ctl.a_run, t >= 4);
      expect_eq("a_load", ctl.a_load, t == 4 && j == 0);
      if (en && ctl.b3_load) begin
        // RU_B3 recomputes quarter qq+1 of block t-4; RU_B2 saves quarter 3-qq of block t-3
        if (t >= 5) expect_eq("pointer read", reg_tag[ctl.seed_slot], (t - 4) * 4 + qq + 1);
        reg_tag[ctl.seed_slot] = (t - 3) * 4 + (3 - qq);
      end
      if (en) n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
