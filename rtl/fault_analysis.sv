// fault_analysis: flags the router on a path as damaged when the fitness of
// the data it delivers falls below the fitness it delivered at the previous
// evaluation.
//
// The block keeps the previous fitness of each path (prev1, prev2, cleared to
// 0 by reset). At a clock edge with en high it compares the new fitness with
// the stored one through a generate/propagate comparator (gp_compare), sets
// op1 / op2 when path 1 / path 2 fell (new < previous), sets fault_enable when
// either fell, sets temp when neither changed, and then stores the new values
// as the previous ones. g1..g4 and p1..p4 are the comparator's per-bit
// generate and propagate terms for path 1 (bit 0 = g1/p1), registered with
// the other outputs. The first evaluation after reset only records the
// fitness values and reports no fault. Outputs are registered, one clock
// after en.
//
// From the document: the ports reset, clk, fault_enable, fit1, fit2, op1, op2,
// temp, the internal g1..g4 and p1..p4, and that the previous fitness results
// are the internal input of the fault analysis. The falling-fitness rule and
// the comparator are this design's reading.
module fault_analysis
  import ga_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       en,
  input  fit_t       fit1,
  input  fit_t       fit2,
  output logic       op1,          // path 1 router damaged
  output logic       op2,          // path 2 router damaged
  output logic       temp,         // neither fitness changed
  output logic       fault_enable,
  output logic [4:1] g,
  output logic [4:1] p
);

  fit_t prev1, prev2;
  logic primed;
  logic [FIT_W-1:0] g1v, p1v, g2v, p2v;
  logic gt1, lt1, eq1, gt2, lt2, eq2;

  gp_compare #(.W(FIT_W)) u_cmp1 (
    .a(fit1), .b(prev1), .g(g1v), .p(p1v), .gt(gt1), .lt(lt1), .eq(eq1)
  );
  gp_compare #(.W(FIT_W)) u_cmp2 (
    .a(fit2), .b(prev2), .g(g2v), .p(p2v), .gt(gt2), .lt(lt2), .eq(eq2)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      prev1        <= '0;
      prev2        <= '0;
      primed       <= 1'b0;
      op1          <= 1'b0;
      op2          <= 1'b0;
      temp         <= 1'b0;
      fault_enable <= 1'b0;
      g            <= '0;
      p            <= '0;
    end else if (en) begin
      prev1        <= fit1;
      prev2        <= fit2;
      primed       <= 1'b1;
      op1          <= primed && lt1;
      op2          <= primed && lt2;
      fault_enable <= primed && (lt1 || lt2);
      temp         <= primed && eq1 && eq2;
      g            <= g1v;
      p            <= p1v;
    end
  end

  // gt1/gt2 and path 2's per-bit terms are not brought out.
  logic unused;
  assign unused = ^{gt1, gt2, g2v, p2v};

endmodule
