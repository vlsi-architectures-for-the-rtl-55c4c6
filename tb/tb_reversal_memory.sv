// tb_reversal_memory: drives the memory the way the decoder does, one read-and-write per
// cycle at an address that counts up in one L-cycle segment and down in the next, and checks
// that each segment reads back the words of the previous segment in reverse order. Cycles
// with en = 0 must neither write nor advance the pattern.
module tb_reversal_memory;
  int checks = 0, failures = 0;
  localparam int L = 16, W = 20;
  logic clk = 0, en = 0;
  logic [$clog2(L)-1:0] addr = '0;
  logic [W-1:0] wdata = '0, rdata;

  reversal_memory #(.L(L), .W(W)) dut (.clk, .en, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] prev [L], cur [L];

  initial begin
    for (int seg = 0; seg < 12; seg++) begin
      int j;
      j = 0;
      while (j < L) begin
        @(negedge clk);
        en = ($urandom_range(0, 4) != 0);
        addr = (seg % 2) ? $clog2(L)'(L - 1 - j) : $clog2(L)'(j);
        wdata = W'($urandom);
        #1;
        if (en) begin
          if (seg > 0) begin
            checks++;
            if (rdata != prev[L - 1 - j]) begin
              failures++;
              if (failures < 10) $display("seg %0d j %0d got %h exp %h", seg, j, rdata, prev[L - 1 - j]);
            end
          end
          cur[j] = wdata;
          j++;
        end
      end
      prev = cur;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
