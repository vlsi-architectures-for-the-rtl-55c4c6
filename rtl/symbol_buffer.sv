// symbol_buffer: banked store of received symbols for the recursion units.
//
// NBANK banks of L symbols each. In every L-cycle segment one bank receives the incoming
// block while the other three are read, each by one recursion unit: RU_B1 reads the most
// recent complete block backwards, RU_A the one before forwards, RU_B2 the one before that
// backwards. The controller rotates the roles every segment, so each bank sees one access per
// cycle. Branch metrics are recomputed from the stored symbols by each unit. Reads are
// asynchronous, the write happens at the clock edge.
module symbol_buffer
  import map_pkg::*;
#(
  parameter int L     = 64,
  parameter int NBANK = 4,
  parameter int NRD   = 3
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(NBANK)-1:0] wr_bank,
  input  logic [$clog2(L)-1:0]     wr_addr,
  input  sym_t                     wr_data,
  input  logic [$clog2(NBANK)-1:0] rd_bank [NRD],
  input  logic [$clog2(L)-1:0]     rd_addr [NRD],
  output sym_t                     rd_data [NRD]
);

  sym_t mem [NBANK][L];

  always_ff @(posedge clk)
    if (wr_en) mem[wr_bank][wr_addr] <= wr_data;

  always_comb
    for (int r = 0; r < NRD; r++)
      rd_data[r] = mem[rd_bank[r]][rd_addr[r]];

endmodule
