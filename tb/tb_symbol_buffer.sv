// tb_symbol_buffer: fills the banks block by block in the rotating order of the decoder and,
// in the same cycles, reads the three older blocks through the three read ports (two
// backwards, one forwards), comparing every symbol with a copy kept here.
module tb_symbol_buffer;
  import map_pkg::*;
  int checks = 0, failures = 0;
  localparam int L = 8;
  logic clk = 0, wr_en = 0;
  logic [1:0] wr_bank = '0;
  logic [$clog2(L)-1:0] wr_addr = '0;
  sym_t wr_data = '0;
  logic [1:0] rd_bank [3];
  logic [$clog2(L)-1:0] rd_addr [3];
  sym_t rd_data [3];

  symbol_buffer #(.L(L)) dut (.clk, .wr_en, .wr_bank, .wr_addr, .wr_data, .rd_bank, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sym_t copy [64][L];

  initial begin
    for (int r = 0; r < 3; r++) begin rd_bank[r] = '0; rd_addr[r] = '0; end
    for (int blk = 0; blk < 40; blk++)
      for (int j = 0; j < L; j++) begin
        @(negedge clk);
        wr_en   = 1'b1;
        wr_bank = 2'(blk);
        wr_addr = $clog2(L)'(j);
        wr_data = sym_t'($urandom);
        copy[blk][j] = wr_data;
        for (int r = 0; r < 3; r++) begin
          rd_bank[r] = 2'(blk - 1 - r);
          rd_addr[r] = (r == 1) ? $clog2(L)'(j) : $clog2(L)'(L - 1 - j);
        end
        #1;
        for (int r = 0; r < 3; r++)
          if (blk - 1 - r >= 0) begin
            checks++;
            if (rd_data[r] != copy[blk - 1 - r][int'(rd_addr[r])]) begin
              failures++;
              if (failures < 10) $display("blk %0d port %0d mismatch", blk, r);
            end
          end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
