// stuck_at_fault: picks the better of two candidate paths from their fitness
// and flags a path whose data word looks stuck.
//
// Each clock edge with enable high and spin low is one evaluation (clock
// edges with spin high are ignored, as while the roulette wheel turns). In an
// evaluation path k is marked stuck when its fitness is 0 or 15: with a
// one-count fitness these are the all-zeros and all-ones data words that a
// router output stuck at 0 or at 1 delivers. op1 is set when path 1 is
// chosen: it is not stuck and path 2 is stuck or fit1 >= fit2. op2 is set
// when path 2 is chosen instead; both are 0 when both paths are stuck.
// fault_enable is set when either path is stuck, and stuck1/stuck2 say
// which. temp holds the raw comparison fit2 >= fit1 of the last evaluation,
// before stuck paths are removed. All outputs are registered, one clock after
// the evaluation; synchronous active-high reset clears them (temp to 1).
//
// From the document: the ports clock, reset, spin, enable, fit1, fit2, op1,
// op2, temp and fault_enable, and that the block finds the shortest data path
// from the fitness values when clock and enable are high and reset and spin
// are low. The stuck rule, the choice rule and the meaning of temp are this
// design's own.
module stuck_at_fault
  import ga_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic spin,
  input  logic enable,
  input  fit_t fit1,
  input  fit_t fit2,
  output logic op1,
  output logic op2,
  output logic temp,
  output logic fault_enable,
  output logic stuck1,
  output logic stuck2
);

  localparam fit_t STUCK_LO = '0;
  localparam fit_t STUCK_HI = '1;

  logic s1, s2, ge;

  always_comb begin
    s1 = (fit1 == STUCK_LO) || (fit1 == STUCK_HI);
    s2 = (fit2 == STUCK_LO) || (fit2 == STUCK_HI);
    ge = fit1 >= fit2;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      op1          <= 1'b0;
      op2          <= 1'b0;
      temp         <= 1'b1;
      fault_enable <= 1'b0;
      stuck1       <= 1'b0;
      stuck2       <= 1'b0;
    end else if (enable && !spin) begin
      op1          <= !s1 && (s2 || ge);
      op2          <= !s2 && !(!s1 && (s2 || ge));
      temp         <= fit2 >= fit1;
      fault_enable <= s1 || s2;
      stuck1       <= s1;
      stuck2       <= s2;
    end
  end

endmodule
