// tb_maxstar_lut: exhaustive test of the MAX* correction table. For every NSM-bit |x-y| the
// output must equal round(8 * ln(1 + exp(-d/8))) below 4.0 (32 quanta) and 0 from there on,
// with the expected value computed here in floating point.
module tb_maxstar_lut;
  import map_pkg::*;
  int checks = 0, failures = 0;
  logic [NSM-1:0] absdiff;
  ofs_t offset;

  maxstar_lut dut (.absdiff, .offset);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < (1 << NSM); d++) begin
      int e;
      absdiff = NSM'(d);
      #1;
      e = (d < 32) ? int'($floor(8.0 * $ln(1.0 + $exp(-real'(d) / 8.0)) + 0.5)) : 0;
      checks++;
      if (int'(offset) != e) begin
        failures++;
        if (failures < 10) $display("d=%0d got %0d exp %0d", d, offset, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
