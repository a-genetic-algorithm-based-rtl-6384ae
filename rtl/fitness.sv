// fitness: 4-bit fitness of the two mutated chromosomes.
//
// On a clock edge with spin high (the enable) fit1 and fit2 take the number
// of one bits in mut1 and mut2, saturated at 15; otherwise they hold. Reset
// is synchronous, active high, and clears both to 0. Results appear one clock
// after spin.
//
// From the document: the ports clk, reset, spin, fit1, fit2, the 4-bit result
// and that a value is produced only when the clock and the enable are high.
// The document does not state the fitness formula; counting one bits is this
// design's choice, so the fitness values of the document's waveform are not
// reproduced.
module fitness
  import ga_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   spin,
  input  chrom_t mut1,
  input  chrom_t mut2,
  output fit_t   fit1,
  output fit_t   fit2
);

  always_ff @(posedge clk) begin
    if (reset) begin
      fit1 <= '0;
      fit2 <= '0;
    end else if (spin) begin
      fit1 <= ones_fitness(mut1);
      fit2 <= ones_fitness(mut2);
    end
  end

endmodule
