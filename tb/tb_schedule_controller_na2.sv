// tb_schedule_controller_na2: runs the controller of the (n_A = 2, n_B = 2, M_B) schedule
// with random stalls and checks, every enabled cycle, against a count kept here: bank
// rotation modulo 5 (write T, RU_B1 T-1, RU_B2 and RU_A1 T-3, RU_A2 T-4), the forward and
// reverse addresses, the half flag, the LLR delay address, the B memory address reversing
// every half-segment, the load strobes and the fill flags.
module tb_schedule_controller_na2;
  import map_pkg::*;
  int checks = 0, failures = 0;
  localparam int L = 16, H = L / 2;
  logic clk = 0, rst_n = 0, en = 0;
  sched_na2_ctl_t ctl;

  schedule_controller_na2 #(.L(L)) dut (.clk, .rst_n, .en, .ctl);

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
    int n;
    n = 0;
    @(negedge clk);
    rst_n = 1;
    while (n < 40 * L) begin
      int t, j, hn;
      @(negedge clk);
      en = ($urandom_range(0, 5) != 0);
      #1;
      t = n / L; j = n % L; hn = n / H;
      expect_eq("wr_bank", ctl.wr_bank, t % 5);
      expect_eq("b1_bank", ctl.b1_bank, (t + 4) % 5);
      expect_eq("b2_bank", ctl.b2_bank, (t + 2) % 5);
      expect_eq("a2_bank", ctl.a2_bank, (t + 1) % 5);
      expect_eq("fwd", int'(ctl.fwd_addr), j);
      expect_eq("rev", int'(ctl.rev_addr), L - 1 - j);
      expect_eq("half", int'(ctl.half_addr), j % H);
      expect_eq("upper", ctl.upper, j >= H);
      expect_eq("bmem", int'(ctl.bmem_addr), (hn % 2) ? H - 1 - j % H : j % H);
      expect_eq("b2_load", ctl.b2_load, j == 0);
      expect_eq("bmem_we", ctl.bmem_we, t >= 3);
      expect_eq("a1_run", ctl.a1_run, t >= 3);
      expect_eq("a1_load", ctl.a1_load, t == 3 && j == 0);
      expect_eq("a2_run", ctl.a2_run, t >= 4);
      expect_eq("a2_load", ctl.a2_load, t == 4 && j == 0);
      if (en) n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
