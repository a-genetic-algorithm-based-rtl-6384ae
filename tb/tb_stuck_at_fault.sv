// tb_stuck_at_fault: self-checking test of the path choice and stuck-word
// check.
//
// Random fitness pairs, with the stuck values 0 and 15 made frequent, are
// evaluated; a reference model gives the expected path choice (op1/op2),
// stuck flags, fault_enable and temp. Evaluations with enable low or spin
// high must leave the outputs unchanged. The first published case (fitness
// 1010 against 1001 chooses path 1) is replayed.
module tb_stuck_at_fault;
  import ga_pkg::*;

  logic clk = 1'b0;
  logic reset, spin, enable;
  fit_t fit1, fit2;
  logic op1, op2, temp, fault_enable, stuck1, stuck2;
  int checks = 0, failures = 0, faults = 0;

  stuck_at_fault dut (.clk, .reset, .spin, .enable, .fit1, .fit2, .op1, .op2,
                      .temp, .fault_enable, .stuck1, .stuck2);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic fit_t pick_fit();
    case ($urandom_range(0, 5))
      0: return 4'd0;
      1: return 4'd15;
      default: return 4'($urandom);
    endcase
  endfunction

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; spin = 1'b0; enable = 1'b0; fit1 = 0; fit2 = 0;
    @(posedge clk);
    @(negedge clk) reset = 1'b0;
    check(!op1 && !op2 && temp && !fault_enable, "reset values");
    fit1 = 4'b1010; fit2 = 4'b1001; enable = 1'b1;
    @(negedge clk);
    check(op1 && !op2 && !temp && !fault_enable, "published case 1010 vs 1001");
    for (int t = 0; t < 600; t++) begin
      logic h1, h2, ht, hf;
      bit s1, s2, c1, c2;
      h1 = op1; h2 = op2; ht = temp; hf = fault_enable;
      fit1 = pick_fit(); fit2 = pick_fit();
      enable = $urandom_range(0, 3) != 0;
      spin = $urandom_range(0, 4) == 0;
      s1 = fit1 == 0 || fit1 == 15;
      s2 = fit2 == 0 || fit2 == 15;
      if (s1) c1 = 0; else if (s2) c1 = 1; else c1 = fit1 >= fit2;
      c2 = !s2 && !c1;
      @(negedge clk);
      if (enable && !spin) begin
        check(op1 == c1 && op2 == c2, $sformatf("choice for %0d/%0d", fit1, fit2));
        check(stuck1 == s1 && stuck2 == s2 && fault_enable == (s1 || s2), "stuck flags");
        check(temp == (fit2 >= fit1), "temp");
        if (fault_enable) faults++;
      end else begin
        check(op1 == h1 && op2 == h2 && temp == ht && fault_enable == hf, "hold");
      end
    end
    check(faults > 0, "stuck paths seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
