// tb_maxstar: random test of the two-operand MAX* operator on modulo-2^NSM operands. True
// operands are drawn with |x-y| < 2^(NSM-1), offset by a random base so that wrap-around
// occurs, and the result must equal (max + correction) modulo 2^NSM, the correction being
// computed here in floating point.
module tb_maxstar;
  import map_pkg::*;
  int checks = 0, failures = 0;
  logic [NSM-1:0] x, y, z;

  maxstar dut (.x, .y, .z);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int corr(int d);
    return (d < 32) ? int'($floor(8.0 * $ln(1.0 + $exp(-real'(d) / 8.0)) + 0.5)) : 0;
  endfunction

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int base, dx, tx, ty, e, lim;
      base = $urandom_range(0, 100000);
      lim  = (i % 2) ? 40 : 2000;                // half the draws near equality
      dx   = $urandom_range(0, 2 * lim) - lim;
      tx   = base + dx;
      ty   = base;
      x = NSM'(tx);
      y = NSM'(ty);
      #1;
      e = ((tx > ty) ? tx : ty) + corr((tx > ty) ? tx - ty : ty - tx);
      checks++;
      if (z != NSM'(e)) begin
        failures++;
        if (failures < 10) $display("x=%0d y=%0d got %0d exp %0d", tx, ty, z, NSM'(e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
