// tb_schedule_controller: runs the controller with random stalls and checks, every enabled
// cycle, the segment roles against a count kept here: bank of the incoming block T mod 4,
// RU_B1 on T-1, RU_A on T-2, RU_B2 on T-3; addresses j and L-1-j; the reversal address
// alternating up and down between segments; load strobes at j = 0; the forward initial load
// only at the start of segment 2; and the fill flags from segments 2, 3 and 4 on.
module tb_schedule_controller;
  import map_pkg::*;
  int checks = 0, failures = 0;
  localparam int L = 8;
  logic clk = 0, rst_n = 0, en = 0;
  sched_ctl_t ctl;

  schedule_controller #(.L(L)) dut (.clk, .rst_n, .en, .ctl);

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

  initial begin
    int n = 0;
    @(negedge clk);
    rst_n = 1;
    while (n < 40 * L) begin
      int t, j;
      @(negedge clk);
      en = ($urandom_range(0, 5) != 0);
      #1;
      t = n / L; j = n % L;
      expect_eq("wr_bank", ctl.wr_bank, t % 4);
      expect_eq("b1_bank", ctl.b1_bank, (t + 3) % 4);
      expect_eq("a_bank",  ctl.a_bank,  (t + 2) % 4);
      expect_eq("b2_bank", ctl.b2_bank, (t + 1) % 4);
      expect_eq("fwd", int'(ctl.fwd_addr), j);
      expect_eq("rev", int'(ctl.rev_addr), L - 1 - j);
      expect_eq("svm", int'(ctl.svm_addr), (t % 2) ? L - 1 - j : j);
      expect_eq("b1_load", ctl.b1_load, j == 0);
      expect_eq("b2_load", ctl.b2_load, j == 0);
      expect_eq("a_load",  ctl.a_load,  (j == 0) && (t == 2));
      expect_eq("a_run",   ctl.a_run,   t >= 2);
      expect_eq("llr_run", ctl.llr_run, t >= 3);
      expect_eq("out_run", ctl.out_run, t >= 4);
      if (en) n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
