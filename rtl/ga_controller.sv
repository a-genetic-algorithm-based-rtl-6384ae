// ga_controller: sequencer of the genetic-algorithm loop, one generation per
// pass.
//
// start (in IDLE) begins an operation: LOAD raises rd so the router captures
// the two parent words; BREED raises mut_en (the mutation stage captures the
// crossover children) and xover_en (the crossover split point steps for the
// next generation); FIT raises fit_en; EVAL raises eval for one clock, which
// makes the path-choice and fault blocks evaluate the new fitness values and
// spins the roulette wheel; SPIN waits for the wheel's done pulse; SELECT
// waits one clock for the selected offspring; WB raises wr so the offspring
// replaces parent 1 in the router. After GENS generations the controller
// raises done for one clock and returns to IDLE; otherwise it goes back to
// BREED with the new parents. If the router reports that no unblocked
// direction was left (rd_fail, seen in the cycle after LOAD) the operation
// ends at once with done and failed high. busy is high outside IDLE.
//
// From the document: the loop itself (choose a population, evaluate, select,
// breed by crossover and mutation, evaluate the offspring, replace the worst,
// repeat until a terminating condition) and that the wheel is spun as many
// times as the population has members. The state sequence, the one-clock
// stages and the fixed generation count as terminating condition are this
// design's choices.
module ga_controller #(
  parameter int unsigned GENS = 4   // generations (wheel spins) per operation
) (
  input  logic clk,
  input  logic reset,
  input  logic start,
  input  logic rd_fail,
  input  logic wheel_busy,
  input  logic wheel_done,
  output logic rd,
  output logic wr,
  output logic xover_en,
  output logic mut_en,
  output logic fit_en,
  output logic eval,
  output logic busy,
  output logic done,
  output logic failed,
  output logic [7:0] gen
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_BREED, S_FIT, S_EVAL, S_SPIN, S_SELECT, S_WB
  } state_e;

  state_e state;
  logic   first;   // first BREED after LOAD: check rd_fail

  always_comb begin
    rd       = state == S_LOAD;
    wr       = state == S_WB;
    mut_en   = state == S_BREED && !(first && rd_fail);
    xover_en = mut_en;
    fit_en   = state == S_FIT;
    eval     = state == S_EVAL;
    busy     = state != S_IDLE;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state  <= S_IDLE;
      first  <= 1'b0;
      done   <= 1'b0;
      failed <= 1'b0;
      gen    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_LOAD;
          gen    <= '0;
          failed <= 1'b0;
        end
        S_LOAD: begin
          state <= S_BREED;
          first <= 1'b1;
        end
        S_BREED: begin
          first <= 1'b0;
          if (first && rd_fail) begin
            state  <= S_IDLE;
            done   <= 1'b1;
            failed <= 1'b1;
          end else begin
            state <= S_FIT;
          end
        end
        S_FIT:    state <= S_EVAL;
        S_EVAL:   state <= S_SPIN;
        S_SPIN:   if (wheel_done) state <= S_SELECT;
        S_SELECT: state <= S_WB;
        S_WB: begin
          gen <= gen + 1'b1;
          if (int'(gen) + 1 >= int'(GENS)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_BREED;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The wheel is idle whenever a spin is requested, and spinning while we wait.
  a_spin_idle: assert property (@(posedge clk) disable iff (reset)
                                eval |-> !wheel_busy);
  a_wait_busy: assert property (@(posedge clk) disable iff (reset)
                                (state == S_SPIN && !wheel_done) |-> wheel_busy);

endmodule
