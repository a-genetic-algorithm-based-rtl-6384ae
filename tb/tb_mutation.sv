// tb_mutation: self-checking test of the mutation stage.
//
// Two instances run side by side on the same children: one at the default
// rate (8 in 256) and one at rate 256, which mutates on every step. A model
// of the 16-bit LFSR (x^16 + x^14 + x^13 + x^11 + 1, seed 16'hACE1) in the
// testbench predicts, for every enabled clock, whether the word mutates and
// which bit of each child flips. Also checked: exactly one bit differs after
// a mutation, the outputs hold while en is low, the observed mutation count
// is near 8/256 of the steps, and reset.
module tb_mutation;
  import ga_pkg::*;

  logic clk = 1'b0;
  logic reset, en;
  chrom_t child1, child2, mut1, mut2, a_mut1, a_mut2;
  logic mutated, a_mutated;
  logic [15:0] model;
  int checks = 0, failures = 0, hits = 0, steps = 0;

  mutation dut (.clk, .reset, .en, .child1, .child2, .mut1, .mut2, .mutated);
  mutation #(.MUT_RATE(256)) dut_all (.clk, .reset, .en, .child1, .child2,
                                      .mut1(a_mut1), .mut2(a_mut2), .mutated(a_mutated));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Testbench copy of the random source.
  always @(posedge clk)
    if (reset) model <= 16'hACE1;
    else       model <= {model[14:0], model[15] ^ model[13] ^ model[12] ^ model[10]};

  initial begin
    #500000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; en = 1'b0; child1 = '0; child2 = '0;
    @(posedge clk); @(posedge clk);
    @(negedge clk) reset = 1'b0;
    check(mut1 == 0 && mut2 == 0 && !mutated, "cleared by reset");
    for (int t = 0; t < 3000; t++) begin
      logic [15:0] r;
      chrom_t c1, c2, e1, e2;
      logic hit;
      c1 = 16'($urandom); c2 = 16'($urandom);
      child1 = c1; child2 = c2;
      en = ($urandom_range(0, 3) != 0);
      r = model;
      hit = r[15:8] < 8'd8;
      e1 = c1; e2 = c2;
      if (hit) begin
        e1[r[3:0]] = ~e1[r[3:0]];
        e2[r[7:4]] = ~e2[r[7:4]];
      end
      begin
        chrom_t h1, h2;
        h1 = mut1; h2 = mut2;
        @(negedge clk);
        if (en) begin
          steps++;
          if (mutated) hits++;
          check(mut1 == e1 && mut2 == e2 && mutated == hit, $sformatf("step %0d rate 8", t));
          check($countones(a_mut1 ^ c1) == 1 && $countones(a_mut2 ^ c2) == 1 && a_mutated,
                "rate 256 flips exactly one bit of each child");
          check(a_mut1 == (c1 ^ (16'h1 << r[3:0])) && a_mut2 == (c2 ^ (16'h1 << r[7:4])),
                "rate 256 bit positions");
        end else begin
          check(mut1 == h1 && mut2 == h2, "hold while en low");
        end
      end
    end
    check(hits > steps * 8 / 256 / 3 && hits < steps * 8 / 256 * 3,
          $sformatf("mutation count %0d of %0d steps", hits, steps));
    $display("mutations: %0d of %0d steps", hits, steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
