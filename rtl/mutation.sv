// mutation: flips one pseudo-randomly chosen bit of each child with a low
// probability.
//
// A 16-bit maximal-length Fibonacci LFSR (taps 16, 14, 13, 11) steps on every
// clock. Its low nibble and next nibble give the bit positions for child 1 and
// child 2; a position is decoded into a one-hot "modify" mask. Its high byte
// decides whether this step mutates: it does when high byte < MUT_RATE, i.e.
// with probability MUT_RATE/256. On a clock edge with en high the outputs
// mut1/mut2 take child XOR mask (or the child unchanged) and `mutated` tells
// which happened. Results appear one clock after en.
//
// From the document: the ports child1, child2, mut1, mut2, clk, reset, the
// 16-bit width, that mutation alters gene values with a probability that is
// kept low, and that the modified bit position comes from an encoder. The
// document does not give the random source or the rate; the LFSR, the
// position fields and reading the waveform value r = 8 as the rate out of 256
// are this design's choices, so the mutated words of the document's waveform
// are not reproduced.
module mutation
  import ga_pkg::*;
#(
  parameter int unsigned MUT_RATE = 8,          // mutations per 256 steps
  parameter logic [15:0] SEED     = 16'hACE1    // LFSR value after reset
) (
  input  logic   clk,
  input  logic   reset,
  input  logic   en,
  input  chrom_t child1,
  input  chrom_t child2,
  output chrom_t mut1,
  output chrom_t mut2,
  output logic   mutated
);

  logic [15:0] lfsr;
  logic        hit;
  chrom_t      mask1, mask2;

  always_comb begin
    hit   = int'(lfsr[15:8]) < int'(MUT_RATE);
    mask1 = chrom_t'(1) << lfsr[3:0];
    mask2 = chrom_t'(1) << lfsr[7:4];
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      lfsr    <= SEED;
      mut1    <= '0;
      mut2    <= '0;
      mutated <= 1'b0;
    end else begin
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      if (en) begin
        mut1    <= hit ? (child1 ^ mask1) : child1;
        mut2    <= hit ? (child2 ^ mask2) : child2;
        mutated <= hit;
      end
    end
  end

endmodule
