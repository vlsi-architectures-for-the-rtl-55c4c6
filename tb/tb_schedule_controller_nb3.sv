// tb_schedule_controller_nb3: runs the controller of the n_B = 3 schedule with random stalls
// and checks, every enabled cycle, against a count kept here: write bank S mod 8; backward
// unit u in phase p = (S - u) mod 3 reading half-block S-1-2p; RU_A on half-block S-6;
// addresses j and H-1-j; the B memory address alternating up and down; restarts of the
// phase-0 unit at j = 0; the phase-2 unit selected as B-vector source; and the fill flags.
module tb_schedule_controller_nb3;
  import map_pkg::*;
  int checks = 0, failures = 0;
  localparam int L = 16, H = L / 2;
  logic clk = 0, rst_n = 0, en = 0;
  sched3_ctl_t ctl;

  schedule_controller_nb3 #(.L(L)) dut (.clk, .rst_n, .en, .ctl);

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
    while (n < 60 * H) begin
      int t, j, genu;
      @(negedge clk);
      en = ($urandom_range(0, 5) != 0);
      #1;
      t = n / H; j = n % H;
      expect_eq("wr_bank", ctl.wr_bank, t % 8);
      expect_eq("a_bank", ctl.a_bank, (t + 2) % 8);
      genu = -1;
      for (int u = 0; u < 3; u++) begin
        int p;
        p = (t - u + 300) % 3;
        expect_eq("b_bank", ctl.b_bank[u], (t - 1 - 2 * p + 800) % 8);
        expect_eq("b_load", ctl.b_load[u], (j == 0) && (p == 0));
        if (p == 2) genu = u;
      end
      expect_eq("gen_unit", ctl.gen_unit, genu);
      expect_eq("fwd", int'(ctl.fwd_addr), j);
      expect_eq("rev", int'(ctl.rev_addr), H - 1 - j);
      expect_eq("bmem", int'(ctl.bmem_addr), (t % 2) ? H - 1 - j : j);
      expect_eq("bmem_we", ctl.bmem_we, t >= 5);
      expect_eq("a_run", ctl.a_run, t >= 6);
      expect_eq("a_load", ctl.a_load, (t == 6) && (j == 0));
      if (en) n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
