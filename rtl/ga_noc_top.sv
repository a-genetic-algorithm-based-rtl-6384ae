// ga_noc_top: genetic-algorithm error-detection router of a dynamic
// network-on-chip.
//
// Data words arrive on the four direction ports n, s, w, e. An operation
// (start pulse) reads two of them, chosen by sel1 and sel2, as parent node
// words and runs GENS generations of a genetic algorithm on them:
//   router_arrangement -> crossover -> mutation -> fitness
//     -> stuck_at_fault (path choice, stuck-word check)
//     -> fault_analysis (fitness-drop check against the previous generation)
//     -> roulette_wheel (fitness-proportionate choice of one offspring)
//     -> written back into the router as the next parent 1.
// ga_controller sequences the stages. Whenever the checks of an evaluation
// find a stuck or damaged path, the direction that path's parent was read
// from is marked in `blocked` and later reads reject it, so data travels
// through the remaining fault-free directions. clear_blocked unmarks all.
//
// Interface: start is sampled in the idle state; busy is high during an
// operation; done pulses at its end, with failed high if no unblocked
// direction was left to read. result is the last selected offspring;
// path1/path2 say which path the last evaluation chose, fault_enable and
// damaged report the last evaluation's stuck and fitness-drop findings,
// digit1:digit0 show the roulette wheel.
//
// Timing: the path choice of the first generation is on path1/path2 four
// clocks after the read (read, breed, fitness, evaluate); a generation lasts
// 6 clocks plus one spin of the wheel (4905 clocks with the default wheel).
//
// The block chain follows the document's class diagram (input, router,
// genetic algorithm, critical path analysis, fault analysis, result) and its
// per-block waveforms; the sequencing, the write-back and the port blocking
// are this design's own.
module ga_noc_top
  import ga_pkg::*;
#(
  parameter int unsigned GENS       = 4,    // wheel spins per operation
  parameter int unsigned MUT_RATE   = 8,    // mutations per 256 steps
  parameter int unsigned SPIN_START = 10,
  parameter int unsigned MAX_SPIN   = 100,
  parameter int unsigned SPIN_INC   = 1
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  logic             clear_blocked,
  input  dir_e             sel1,
  input  dir_e             sel2,
  input  chrom_t           n,
  input  chrom_t           s,
  input  chrom_t           w,
  input  chrom_t           e,
  output logic             busy,
  output logic             done,
  output logic             failed,
  output chrom_t           result,
  output fit_t             fit1,
  output fit_t             fit2,
  output logic             path1,
  output logic             path2,
  output logic             fault_enable,
  output logic             damaged,
  output logic [N_DIR-1:0] blocked,
  output logic [3:0]       digit1,
  output logic [3:0]       digit0,
  output logic [7:0]       gen
);

  logic   rd, wr, xover_en, mut_en, fit_en, eval, eval_d, rd_fail;
  logic   wheel_busy, wheel_done, pick2, mutated;
  chrom_t parent1, parent2, child1, child2, mut1, mut2, selected;
  dir_e   dir1, dir2;
  logic [$clog2(CHROM_W)-1:0] split;
  logic   stuck1, stuck2, sa_temp;
  logic   dmg1, dmg2, fa_temp;
  logic [4:1] fa_g, fa_p;

  ga_controller #(.GENS(GENS)) u_ctrl (
    .clk, .reset, .start, .rd_fail,
    .wheel_busy, .wheel_done,
    .rd, .wr, .xover_en, .mut_en, .fit_en, .eval,
    .busy, .done, .failed, .gen
  );

  router_arrangement u_router (
    .clk, .reset, .rd, .wr, .sel1, .sel2,
    .n, .s, .w, .e, .din(selected), .blocked,
    .op(parent1), .op2(parent2), .dir1, .dir2, .rd_fail
  );

  crossover #(.N(CHROM_W)) u_xover (
    .clk, .reset, .en(xover_en), .parent1, .parent2,
    .child1, .child2, .split
  );

  mutation #(.MUT_RATE(MUT_RATE)) u_mut (
    .clk, .reset, .en(mut_en), .child1, .child2, .mut1, .mut2, .mutated
  );

  fitness u_fit (
    .clk, .reset, .spin(fit_en), .mut1, .mut2, .fit1, .fit2
  );

  stuck_at_fault u_stuck (
    .clk, .reset, .spin(1'b0), .enable(eval), .fit1, .fit2,
    .op1(path1), .op2(path2), .temp(sa_temp), .fault_enable,
    .stuck1, .stuck2
  );

  fault_analysis u_fault (
    .clk, .reset, .en(eval), .fit1, .fit2,
    .op1(dmg1), .op2(dmg2), .temp(fa_temp), .fault_enable(damaged),
    .g(fa_g), .p(fa_p)
  );

  roulette_wheel #(
    .SPIN_START(SPIN_START), .MAX_SPIN(MAX_SPIN), .SPIN_INC(SPIN_INC)
  ) u_wheel (
    .clk, .reset, .spin(eval), .parent1(mut1), .parent2(mut2),
    .fit1, .fit2, .digit1, .digit0, .prstate(wheel_busy),
    .done(wheel_done), .pick2, .selected
  );

  // Reject the directions of the paths found faulty by the last evaluation.
  always_ff @(posedge clk) begin
    if (reset) begin
      eval_d  <= 1'b0;
      blocked <= '0;
    end else begin
      eval_d <= eval;
      if (clear_blocked) begin
        blocked <= '0;
      end else if (eval_d) begin
        if (stuck1 || dmg1) blocked[dir1] <= 1'b1;
        if (stuck2 || dmg2) blocked[dir2] <= 1'b1;
      end
    end
  end

  assign result = parent1;

  // Diagnostic signals that are not brought out.
  logic unused;
  assign unused = ^{split, mutated, pick2, sa_temp, fa_temp, fa_g, fa_p};

endmodule
