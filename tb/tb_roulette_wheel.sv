// tb_roulette_wheel: self-checking test of the roulette-wheel selection at
// the default wheel timing (spintime 10 growing to 100).
//
// The testbench counts clocks since reset to know the wheel's start phase,
// spins the wheel with random individuals and fitness values and checks: the
// wheel starts from the phase, stops 4905 clocks after the spin with 90 steps
// taken, shows the stopped position on the BCD digits, picks individual 1
// exactly when position * (fit1 + fit2) < 100 * fit1, and ignores spin while
// it turns. Both picks must occur.
module tb_roulette_wheel;
  import ga_pkg::*;

  logic clk = 1'b0;
  logic reset, spin, prstate, done, pick2;
  chrom_t parent1, parent2, selected;
  fit_t fit1, fit2;
  logic [3:0] digit1, digit0;
  int checks = 0, failures = 0, edges = 0, picks1 = 0, picks2 = 0;

  roulette_wheel dut (.clk, .reset, .spin, .parent1, .parent2, .fit1, .fit2,
                      .digit1, .digit0, .prstate, .done, .pick2, .selected);

  always #5 clk = ~clk;

  // Clock edges since reset was released; the wheel phase is edges mod 100.
  always @(posedge clk)
    if (reset) edges <= 0;
    else       edges <= edges + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; spin = 1'b0;
    parent1 = '0; parent2 = '0; fit1 = '0; fit2 = '0;
    @(posedge clk);
    @(negedge clk) reset = 1'b0;
    check(!prstate && digit1 == 0 && digit0 == 0, "idle after reset");
    for (int t = 0; t < 24; t++) begin
      int start, stop, cycles, v;
      bit exp2;
      repeat ($urandom_range(0, 150)) @(negedge clk);
      parent1 = 16'($urandom); parent2 = 16'($urandom);
      fit1 = 4'($urandom); fit2 = 4'($urandom);
      if (t == 0) begin fit1 = 0; fit2 = 0; end
      start = edges % 100;
      spin = 1'b1;
      @(negedge clk) spin = 1'b0;
      check(prstate && int'(digit1) * 10 + int'(digit0) == start, "wheel starts at phase");
      cycles = 1;
      while (!done && cycles < 6000) begin
        if (cycles == 100) spin = 1'b1;   // ignored while spinning
        if (cycles == 101) spin = 1'b0;
        @(negedge clk);
        cycles++;
      end
      stop = (start + 90) % 100;
      check(cycles - 1 == 4905, $sformatf("spin took %0d clocks", cycles - 1));
      check(!prstate, "wheel idle after stop");
      v = int'(digit1) * 10 + int'(digit0);
      check(v == stop, $sformatf("stopped at %0d expected %0d", v, stop));
      exp2 = !(v * (int'(fit1) + int'(fit2)) < 100 * int'(fit1));
      @(negedge clk);
      check(pick2 == exp2 && selected == (exp2 ? parent2 : parent1),
            $sformatf("pick at %0d with fitness %0d/%0d", v, fit1, fit2));
      check(int'(digit1) * 10 + int'(digit0) == stop, "digits hold the result");
      if (pick2) picks2++; else picks1++;
    end
    check(picks1 > 0 && picks2 > 0, $sformatf("both picks seen (%0d/%0d)", picks1, picks2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
