// roulette_wheel: fitness-proportionate (roulette wheel) selection between two
// individuals.
//
// The wheel is a two-digit BCD counter, digit1:digit0 = 00..99. While idle it
// stands still and shows where it last stopped. A hidden phase counter runs
// 0..99 every clock; a spin starts the wheel from the phase value, so where
// it stops depends on when it is spun. A spin pulse (spin high while idle) starts a spin: prstate goes
// to 1 and the wheel then steps once per "slowedclk" tick, a tick being every
// spintime clocks. spintime starts at SPIN_START and grows by SPIN_INC after
// every tick, so the wheel slows down; when spintime reaches MAX_SPIN the
// wheel stops, prstate returns to 0 and done pulses for one clock. At that
// next clock the stopped position v (0..99) selects individual 1 when
// v * (fit1 + fit2) < 100 * fit1 and individual 2 otherwise (individual 1 when
// both fitnesses are 0), so each is picked with a chance proportional to its
// fitness. `selected` holds the chosen chromosome and pick2 says which.
// With the defaults a spin lasts 10 + 11 + ... + 99 = 4905 clocks and makes
// 90 steps.
//
// From the document: the ports clk, reset, spin, digit0, digit1, the internal
// prstate, slowedclk and spintime, the numbers spintime = 10 and maxspintime =
// 100, the two parent inputs and that a higher fitness makes an individual
// less likely to be eliminated. The growth of spintime by one per step, the
// free-running start phase and the proportional pick rule are this design's
// choices.
module roulette_wheel
  import ga_pkg::*;
#(
  parameter int unsigned SPIN_START = 10,   // "spintime" at the start of a spin
  parameter int unsigned MAX_SPIN   = 100,  // "maxspintime": the wheel stops here
  parameter int unsigned SPIN_INC   = 1     // growth of spintime per step
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       spin,
  input  chrom_t     parent1,
  input  chrom_t     parent2,
  input  fit_t       fit1,
  input  fit_t       fit2,
  output logic [3:0] digit1,
  output logic [3:0] digit0,
  output logic       prstate,    // 1 while the wheel is spinning
  output logic       done,       // one-clock pulse when the wheel stops
  output logic       pick2,      // 1: individual 2 was selected
  output chrom_t     selected
);

  logic [7:0] spintime;
  logic [7:0] divcnt;
  logic       slowedclk;
  logic       step;
  logic [6:0] pos;
  logic [6:0] phase;
  logic       take2;

  assign slowedclk = prstate && (int'(divcnt) + 1 >= int'(spintime));
  assign step      = slowedclk;

  // Wheel position as a binary number, and the proportional pick.
  always_comb begin
    pos   = 7'(digit1 * 4'd10) + 7'(digit0);
    take2 = !(14'(pos) * (14'(fit1) + 14'(fit2)) < 14'(100) * 14'(fit1));
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      digit1   <= '0;
      digit0   <= '0;
      prstate  <= 1'b0;
      spintime <= 8'(SPIN_START);
      divcnt   <= '0;
      done     <= 1'b0;
      pick2    <= 1'b0;
      selected <= '0;
      phase    <= '0;
    end else begin
      done  <= 1'b0;
      phase <= (phase == 7'd99) ? '0 : phase + 1'b1;
      if (step) begin
        if (digit0 == 4'd9) begin
          digit0 <= '0;
          digit1 <= (digit1 == 4'd9) ? '0 : digit1 + 1'b1;
        end else begin
          digit0 <= digit0 + 1'b1;
        end
      end
      if (!prstate) begin
        if (spin) begin
          prstate  <= 1'b1;
          digit1   <= 4'(phase / 7'd10);
          digit0   <= 4'(phase % 7'd10);
          spintime <= 8'(SPIN_START);
          divcnt   <= '0;
        end
      end else if (slowedclk) begin
        divcnt <= '0;
        if (int'(spintime) + int'(SPIN_INC) >= int'(MAX_SPIN)) begin
          // Stop on the position reached by this step.
          prstate <= 1'b0;
          done    <= 1'b1;
        end else begin
          spintime <= spintime + 8'(SPIN_INC);
        end
      end else begin
        divcnt <= divcnt + 1'b1;
      end
      // Select one clock after the stop, from the stopped (held) position.
      if (done) begin
        pick2    <= take2;
        selected <= take2 ? parent2 : parent1;
      end
    end
  end

  // done only ends a spin, and the wheel never stops without it.
  a_done_ends_spin: assert property (@(posedge clk) disable iff (reset)
                                     done |-> !prstate && $past(prstate));
  a_stop_has_done:  assert property (@(posedge clk) disable iff (reset)
                                     ($past(prstate) && !prstate && !$past(reset)) |-> done);

endmodule
