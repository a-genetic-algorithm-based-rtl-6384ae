// tb_fault_analysis: self-checking test of the fitness-drop fault check.
//
// A sequence of random fitness pairs is evaluated; the testbench keeps its
// own copy of the previous values and expects op1/op2 when a path's fitness
// fell, fault_enable when either fell, temp when neither changed, and the
// per-bit generate (new & ~old) and equal (~(new ^ old)) terms of path 1 on
// g/p. The first evaluation after reset must report nothing; idle clocks must
// hold the outputs.
module tb_fault_analysis;
  import ga_pkg::*;

  logic clk = 1'b0;
  logic reset, en;
  fit_t fit1, fit2;
  logic op1, op2, temp, fault_enable;
  logic [4:1] g, p;
  int checks = 0, failures = 0, drops = 0, sames = 0;

  fault_analysis dut (.clk, .reset, .en, .fit1, .fit2, .op1, .op2, .temp,
                      .fault_enable, .g, .p);

  always #5 clk = ~clk;

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

  initial begin
    int p1, p2;
    reset = 1'b1; en = 1'b0; fit1 = 0; fit2 = 0;
    @(posedge clk);
    @(negedge clk) reset = 1'b0;
    fit1 = 4'd12; fit2 = 4'd3; en = 1'b1;
    @(negedge clk);
    check(!op1 && !op2 && !fault_enable && !temp, "first evaluation records only");
    p1 = 12; p2 = 3;
    for (int t = 0; t < 600; t++) begin
      logic h1, h2, ht, hf;
      h1 = op1; h2 = op2; ht = temp; hf = fault_enable;
      fit1 = ($urandom_range(0, 3) == 0) ? 4'(p1) : 4'($urandom);
      fit2 = ($urandom_range(0, 3) == 0) ? 4'(p2) : 4'($urandom);
      en = $urandom_range(0, 3) != 0;
      @(negedge clk);
      if (en) begin
        check(op1 == (int'(fit1) < p1) && op2 == (int'(fit2) < p2),
              $sformatf("drop %0d->%0d %0d->%0d", p1, fit1, p2, fit2));
        check(fault_enable == (int'(fit1) < p1 || int'(fit2) < p2), "fault_enable");
        check(temp == (int'(fit1) == p1 && int'(fit2) == p2), "temp");
        check(g == (fit1 & ~4'(p1)) && p == ~(fit1 ^ 4'(p1)), "g/p terms");
        if (fault_enable) drops++;
        if (temp) sames++;
        p1 = fit1; p2 = fit2;
      end else begin
        check(op1 == h1 && op2 == h2 && temp == ht && fault_enable == hf, "hold");
      end
    end
    check(drops > 0 && sames > 0, $sformatf("drops %0d, unchanged %0d", drops, sames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
