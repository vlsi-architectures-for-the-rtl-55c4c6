// reversal_memory: L-word memory that reverses the order of successive blocks of L words.
//
// Each cycle with en = 1 reads the word at addr and writes wdata to the same address, so a
// single read/write port suffices. The address comes from an up/down counter that counts
// 0..L-1 in one L-cycle segment and L-1..0 in the next: the words written in a segment are
// read back, in reverse order, in the following one, while the new words take their place.
// The read is asynchronous (rdata shows the old contents of addr during the access cycle);
// the write happens at the clock edge. Used as the state vector memory for the forward
// vectors and as the memory that puts the LLRs back into natural order.
module reversal_memory #(
  parameter int L = 64,
  parameter int W = 48
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic [$clog2(L)-1:0] addr,
  input  logic [W-1:0]         wdata,
  output logic [W-1:0]         rdata
);

  logic [W-1:0] mem [L];

  assign rdata = mem[addr];

  always_ff @(posedge clk)
    if (en) mem[addr] <= wdata;

endmodule
