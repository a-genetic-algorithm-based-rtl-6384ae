// tb_ga_controller: self-checking test of the generation sequencer.
//
// A small model of the roulette wheel (busy for a random number of clocks
// after each eval, then a done pulse) answers the controller. For each
// operation the testbench records the strobe sequence and checks it against
// LOAD, then GENS times BREED, FIT, EVAL, (wheel), SELECT, WB, followed by a
// done pulse, the generation count and that start is ignored while busy. A
// final operation with rd_fail raised after LOAD must end with done and
// failed after the BREED clock.
module tb_ga_controller;

  localparam int GENS = 4;   // the controller's default

  logic clk = 1'b0;
  logic reset, start, rd_fail, wheel_busy, wheel_done;
  logic rd, wr, xover_en, mut_en, fit_en, eval, busy, done, failed;
  logic [7:0] gen;
  int checks = 0, failures = 0;
  int wheel_left = 0;
  string trace;

  ga_controller dut (.clk, .reset, .start, .rd_fail, .wheel_busy, .wheel_done, .rd, .wr, .xover_en, .mut_en,
                                    .fit_en, .eval, .busy, .done, .failed, .gen);

  always #5 clk = ~clk;

  // Wheel model.
  always @(posedge clk) begin
    wheel_done <= 1'b0;
    if (reset) begin
      wheel_busy <= 1'b0;
      wheel_left <= 0;
    end else if (eval) begin
      wheel_busy <= 1'b1;
      wheel_left <= $urandom_range(1, 20);
    end else if (wheel_busy) begin
      if (wheel_left == 1) begin
        wheel_busy <= 1'b0;
        wheel_done <= 1'b1;
      end
      wheel_left <= wheel_left - 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One letter per strobe per clock: L=rd B=breed F=fit E=eval W=wr.
  function automatic string strobes();
    string s;
    s = "";
    if (rd) s = {s, "L"};
    if (mut_en && xover_en) s = {s, "B"};
    if (mut_en != xover_en) s = {s, "?"};
    if (fit_en) s = {s, "F"};
    if (eval) s = {s, "E"};
    if (wr) s = {s, "W"};
    return s;
  endfunction

  initial begin
    string expect_s;
    reset = 1'b1; start = 1'b0; rd_fail = 1'b0;
    @(posedge clk); @(posedge clk);
    @(negedge clk) reset = 1'b0;
    check(!busy && !done, "idle after reset");
    expect_s = "L";
    for (int g = 0; g < GENS; g++) expect_s = {expect_s, "BFEW"};
    for (int op = 0; op < 4; op++) begin
      int cycles;
      trace = "";
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      cycles = 0;
      while (!done && cycles < 500) begin
        trace = {trace, strobes()};
        check(busy, "busy during the operation");
        if (cycles == 3) start = 1'b1;   // ignored while busy
        if (cycles == 4) start = 1'b0;
        @(negedge clk);
        cycles++;
      end
      check(trace == expect_s, $sformatf("strobe order %s expected %s", trace, expect_s));
      check(done && !failed && int'(gen) == GENS, $sformatf("done with gen %0d", gen));
      @(negedge clk);
      check(!done && !busy, "done is a pulse, back to idle");
    end
    // No unblocked direction: the operation fails right after LOAD.
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    check(rd && busy, "LOAD");
    @(negedge clk) rd_fail = 1'b1;   // the router's answer to the read
    #1 check(!mut_en && !xover_en, "no breeding after a failed read");
    @(negedge clk) rd_fail = 1'b0;
    check(done && failed && !busy, "failed operation ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
