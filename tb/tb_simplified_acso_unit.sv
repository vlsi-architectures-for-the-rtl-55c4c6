// tb_simplified_acso_unit: drives one simplified ACSO element with random operands,
// decisions and offsets, including metrics near the modulo wrap, and compares the register,
// one enabled clock later, with A = A(s'dec) + G(s'dec) + offset computed here modulo 2^NSM.
// Stalled cycles must leave the register unchanged.
module tb_simplified_acso_unit;
  import map_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, dec = 0;
  sm_t a0 = '0, a1 = '0, a, expect_a;
  bm_t g0 = '0, g1 = '0;
  ofs_t ofs = '0;

  simplified_acso_unit dut (.clk, .rst_n, .en, .a0, .a1, .g0, .g1, .dec, .ofs, .a);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_a = '0;
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      checks++;
      if (a != expect_a) begin
        failures++;
        if (failures < 10) $display("n=%0d got %0d exp %0d", n, a, expect_a);
      end
      en  = ($urandom_range(0, 3) != 0);
      a0  = sm_t'($urandom);
      a1  = (n % 3 == 0) ? a0 + sm_t'($urandom_range(0, 40)) : sm_t'($urandom);
      g0  = bm_t'($urandom_range(0, 252) - 126);
      g1  = bm_t'($urandom_range(0, 252) - 126);
      dec = $urandom_range(0, 1);
      ofs = ofs_t'($urandom_range(0, 6));
      if (en) begin
        int sel;
        sel = dec ? (int'(a1) + int'(g1)) : (int'(a0) + int'(g0));
        expect_a = sm_t'(sel + int'(ofs));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
