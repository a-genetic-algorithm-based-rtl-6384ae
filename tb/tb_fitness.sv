// tb_fitness: self-checking test of the fitness stage.
//
// Random words and corner cases (all zeros, all ones, fifteen ones) go into
// both inputs; after each enabled clock fit1/fit2 must equal the number of
// one bits, saturated at 15. Outputs must hold while spin is low and clear on
// reset.
module tb_fitness;
  import ga_pkg::*;

  logic clk = 1'b0;
  logic reset, spin;
  chrom_t mut1, mut2;
  fit_t fit1, fit2;
  int checks = 0, failures = 0;

  fitness dut (.clk, .reset, .spin, .mut1, .mut2, .fit1, .fit2);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int ref_fit(input chrom_t c);
    int k;
    k = 0;
    for (int i = 0; i < 16; i++) if (c[i]) k++;
    return k > 15 ? 15 : k;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; spin = 1'b0; mut1 = 16'hFFFF; mut2 = 16'h1234;
    @(posedge clk);
    @(negedge clk) reset = 1'b0;
    check(fit1 == 0 && fit2 == 0, "cleared by reset");
    spin = 1'b1;
    @(negedge clk);
    check(fit1 == 15 && fit2 == 5, "all ones saturates at 15");
    mut1 = 16'h7FFF; mut2 = 16'h0000;
    @(negedge clk);
    check(fit1 == 15 && fit2 == 0, "fifteen ones and zero ones");
    for (int t = 0; t < 500; t++) begin
      fit_t h1, h2;
      h1 = fit1; h2 = fit2;
      mut1 = 16'($urandom); mut2 = 16'($urandom);
      spin = $urandom_range(0, 1);
      @(negedge clk);
      if (spin) check(int'(fit1) == ref_fit(mut1) && int'(fit2) == ref_fit(mut2),
                      $sformatf("fitness of %h %h", mut1, mut2));
      else      check(fit1 == h1 && fit2 == h2, "hold while spin low");
    end
    reset = 1'b1;
    @(negedge clk) reset = 1'b0;
    check(fit1 == 0 && fit2 == 0, "cleared by reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
