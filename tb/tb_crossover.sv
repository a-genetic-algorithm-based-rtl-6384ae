// tb_crossover: self-checking test of the single-point crossover.
//
// First replays the published example (parents 0010100110101011 and
// 0010100001010100 at split points 0, 1 and 2), then runs random parents
// through every split point, comparing both children with a bit-by-bit
// reference, and checks that the split wraps from 15 to 0, holds while en is
// low and returns to 0 on reset.
module tb_crossover;
  import ga_pkg::*;

  logic clk = 1'b0;
  logic reset, en;
  chrom_t parent1, parent2, child1, child2;
  logic [3:0] split;
  int checks = 0, failures = 0;

  crossover dut (.clk, .reset, .en, .parent1, .parent2, .child1, .child2, .split);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic chrom_t ref_child(input chrom_t hi, input chrom_t lo, input int k);
    chrom_t c;
    for (int i = 0; i < 16; i++) c[i] = (i <= k) ? lo[i] : hi[i];
    return c;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; en = 1'b0;
    parent1 = 16'b0010100110101011;
    parent2 = 16'b0010100001010100;
    @(posedge clk); @(posedge clk);
    @(negedge clk) reset = 1'b0;
    // Published example.
    check(split == 0, "split 0 after reset");
    check(child1 == 16'b0010100110101010 && child2 == 16'b0010100001010101, "example split 0");
    en = 1'b1;
    @(negedge clk);
    check(split == 1, "split 1");
    check(child1 == 16'b0010100110101000 && child2 == 16'b0010100001010111, "example split 1");
    @(negedge clk);
    check(split == 2, "split 2");
    check(child1 == 16'b0010100110101100 && child2 == 16'b0010100001010011, "example split 2");
    // Hold while en is low.
    en = 1'b0;
    @(negedge clk);
    check(split == 2, "split holds");
    en = 1'b1;
    // Random parents across all split points, two full wraps.
    for (int t = 0; t < 40; t++) begin
      int k;
      k = (2 + t) % 16;
      parent1 = 16'($urandom);
      parent2 = 16'($urandom);
      #1;
      check(int'(split) == k, $sformatf("split %0d expected %0d", split, k));
      check(child1 == ref_child(parent1, parent2, k), $sformatf("child1 split %0d", k));
      check(child2 == ref_child(parent2, parent1, k), $sformatf("child2 split %0d", k));
      @(negedge clk);
    end
    reset = 1'b1;
    @(negedge clk);
    reset = 1'b0;
    check(split == 0, "split cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
