// crossover: single-point crossover of two 16-bit parent chromosomes.
//
// child1 takes parent1's bits above the split point and parent2's bits from
// the split point down to bit 0; child2 takes the opposite halves. With split
// = k the low k+1 bits are exchanged, so split = 0 swaps bit 0 only. The split
// point is a register that steps by one on every clock edge with en high and
// wraps from N-1 back to 0; the children are combinational in the parents and
// the current split, so they change in the same cycle as the parents and one
// clock after a step of the split.
//
// From the document: the ports parent1, parent2, clk, reset, child1, child2,
// the split value, n = 16 and the children's values for split = 0, 1 and 2
// (0010100110101011 x 0010100001010100 gives 0010100110101010 /
// 0010100001010101, then 0010100110101000 / 0010100001010111, then
// 0010100110101100 / 0010100001010011). The en input and the synchronous
// active-high reset of the split to 0 are this design's choices.
module crossover
  import ga_pkg::*;
#(
  parameter int unsigned N = CHROM_W   // chromosome length ("n" in the waveform)
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 en,
  input  logic [N-1:0]         parent1,
  input  logic [N-1:0]         parent2,
  output logic [N-1:0]         child1,
  output logic [N-1:0]         child2,
  output logic [$clog2(N)-1:0] split
);

  logic [N-1:0] low_mask;   // ones at and below the split point

  always_comb begin
    for (int i = 0; i < N; i++) low_mask[i] = (i <= int'(split));
    child1 = (parent1 & ~low_mask) | (parent2 & low_mask);
    child2 = (parent2 & ~low_mask) | (parent1 & low_mask);
  end

  always_ff @(posedge clk) begin
    if (reset)
      split <= '0;
    else if (en)
      split <= (int'(split) == N - 1) ? '0 : split + 1'b1;
  end

endmodule
