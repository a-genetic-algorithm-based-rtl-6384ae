// tb_ga_noc_top: end-to-end self-checking test of the whole router at its
// default parameters (4 generations per operation, mutation rate 8/256,
// wheel slowing from 10 to 100 clocks per step).
//
// The testbench holds its own transaction-level model of the design: the
// port blocking, the crossover split point, the 16-bit LFSR and the wheel
// phase (both derived from the number of clocks since reset), the fitness
// rule, the path choice, the stuck-word and fitness-drop checks and the
// proportional pick. For each operation it predicts the parents, every
// generation's fitness pair and chosen offspring, the cycle at which each
// result appears, and the final result, and compares them with the design.
// Operations are run with random port words, with stuck-at-0 and stuck-at-1
// routers on the ports, with blocked directions requested, until every
// direction is blocked and an operation fails, and after clear_blocked.
// Each mechanism must occur at least once: mutation, both wheel picks, a
// stuck path, a fitness drop, a newly blocked direction, a read redirected
// around a blocked direction, a failed operation, a clear, and a first-
// generation decision that changes the outputs exactly four clocks after the
// start was taken (not one clock earlier).
module tb_ga_noc_top;
  import ga_pkg::*;

  localparam int GENS   = 4;
  localparam int PERIOD = 6 + 4905;      // clocks per generation
  localparam logic [15:0] SEED = 16'hACE1;

  logic clk = 1'b0;
  logic reset, start, clear_blocked;
  dir_e sel1, sel2;
  chrom_t n, s, w, e, result;
  logic busy, done, failed, path1, path2, fault_enable, damaged;
  fit_t fit1, fit2;
  logic [3:0] blocked, digit1, digit0;
  logic [7:0] gen;

  int checks = 0, failures = 0;
  int ecount;                              // clock edges since reset
  int n_mut = 0, n_pick1 = 0, n_pick2 = 0, n_stuck = 0, n_drop = 0;
  int n_block = 0, n_redirect = 0, n_fail = 0, n_clear = 0, n_ops = 0, n_latency = 0;

  // Model state.
  logic [3:0] m_blocked;
  int   m_split;
  fit_t m_prev1, m_prev2;
  bit   m_primed;
  logic [3:0] m_last;                      // last path1, path2, fault_enable, damaged

  ga_noc_top dut (.clk, .reset, .start, .clear_blocked, .sel1, .sel2, .n, .s, .w, .e,
                  .busy, .done, .failed, .result, .fit1, .fit2, .path1, .path2,
                  .fault_enable, .damaged, .blocked, .digit1, .digit0, .gen);

  always #5 clk = ~clk;

  always @(posedge clk)
    if (reset) ecount <= 0;
    else       ecount <= ecount + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [15:0] lfsr_before(input int edge_no);
    logic [15:0] l;
    l = SEED;
    for (int i = 0; i < edge_no; i++) l = {l[14:0], l[15] ^ l[13] ^ l[12] ^ l[10]};
    return l;
  endfunction

  function automatic chrom_t port_of(input int d);
    case (d)
      0: return e;
      1: return w;
      2: return n;
      default: return s;
    endcase
  endfunction

  function automatic int skip(input int d, input logic [3:0] blk);
    for (int k = 0; k < 4; k++)
      if (!blk[(d + k) % 4]) return (d + k) % 4;
    return -1;
  endfunction

  function automatic fit_t ones(input chrom_t c);
    int k;
    k = $countones(c);
    return fit_t'(k > 15 ? 15 : k);
  endfunction

  task automatic wait_edges_to(input int target);   // until ecount == target
    while (ecount < target) @(negedge clk);
  endtask

  // One operation from a start pulse to done, checked against the model.
  task automatic run_op(input dir_e a, input dir_e b);
    int t0, d1, d2;
    chrom_t p1, p2;
    sel1 = a; sel2 = b;
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    n_ops++;
    t0 = ecount - 1;                 // edge that took start
    d1 = skip(int'(a), m_blocked);
    d2 = skip(int'(b), m_blocked);
    if (d1 < 0 || d2 < 0) begin
      wait_edges_to(t0 + 3);
      check(done && failed, "operation fails when every direction is blocked");
      n_fail++;
      @(negedge clk);
      check(!busy, "idle after the failed operation");
      return;
    end
    if (d1 != int'(a) || d2 != int'(b)) n_redirect++;
    p1 = port_of(d1);
    p2 = port_of(d2);
    for (int g = 0; g < GENS; g++) begin
      int eb, ee, start_pos, stop;
      logic [15:0] r;
      chrom_t c1, c2, m1, m2, sel_c;
      fit_t f1, f2;
      bit s1, s2, ch1, ch2, dr1, dr2, take2;
      eb = t0 + 2 + g * PERIOD;
      ee = eb + 2;
      for (int i = 0; i < 16; i++) begin
        c1[i] = (i <= m_split) ? p2[i] : p1[i];
        c2[i] = (i <= m_split) ? p1[i] : p2[i];
      end
      m_split = (m_split + 1) % 16;
      r = lfsr_before(eb);
      m1 = c1; m2 = c2;
      if (r[15:8] < 8'd8) begin
        m1[r[3:0]] = ~m1[r[3:0]];
        m2[r[7:4]] = ~m2[r[7:4]];
        n_mut++;
      end
      f1 = ones(m1); f2 = ones(m2);
      s1 = f1 == 0 || f1 == 15;
      s2 = f2 == 0 || f2 == 15;
      ch1 = !s1 && (s2 || f1 >= f2);
      ch2 = !s2 && !ch1;
      dr1 = m_primed && f1 < m_prev1;
      dr2 = m_primed && f2 < m_prev2;
      m_prev1 = f1; m_prev2 = f2; m_primed = 1;
      // One clock before the evaluation the previous findings still show.
      wait_edges_to(ee);
      check({path1, path2, fault_enable, damaged} == m_last,
            $sformatf("op %0d gen %0d outputs change early", n_ops, g));
      // Fitness and path choice, right after the evaluation clock.
      wait_edges_to(ee + 1);
      check(fit1 == f1 && fit2 == f2, $sformatf("op %0d gen %0d fitness %0d/%0d expected %0d/%0d",
                                                n_ops, g, fit1, fit2, f1, f2));
      check(path1 == ch1 && path2 == ch2, $sformatf("op %0d gen %0d path choice", n_ops, g));
      check(fault_enable == (s1 || s2) && damaged == (dr1 || dr2),
            $sformatf("op %0d gen %0d fault flags", n_ops, g));
      if (g == 0 && {ch1, ch2, s1 || s2, dr1 || dr2} != m_last &&
          {path1, path2, fault_enable, damaged} == {ch1, ch2, s1 || s2, dr1 || dr2})
        n_latency++;
      m_last = {ch1, ch2, s1 || s2, dr1 || dr2};
      if (s1 || s2) n_stuck++;
      if (dr1 || dr2) n_drop++;
      if (((s1 || dr1) && !m_blocked[d1]) || ((s2 || dr2) && !m_blocked[d2])) n_block++;
      if (s1 || dr1) m_blocked[d1] = 1'b1;
      if (s2 || dr2) m_blocked[d2] = 1'b1;
      @(negedge clk);
      check(blocked == m_blocked, $sformatf("blocked %b expected %b", blocked, m_blocked));
      // Wheel.
      start_pos = ee % 100;
      stop = (start_pos + 90) % 100;
      take2 = !(stop * (int'(f1) + int'(f2)) < 100 * int'(f1));
      sel_c = take2 ? m2 : m1;
      if (take2) n_pick2++; else n_pick1++;
      wait_edges_to(ee + 4905 + 1);
      check(int'(digit1) * 10 + int'(digit0) == stop, $sformatf("wheel stopped at %0d%0d, expected %0d",
                                                               digit1, digit0, stop));
      // Write-back of the chosen offspring as the next parent 1.
      wait_edges_to(ee + 4905 + 4);
      check(result == sel_c, $sformatf("op %0d gen %0d offspring %h expected %h",
                                       n_ops, g, result, sel_c));
      p1 = sel_c;
      if (g == GENS - 1) check(done && !failed && gen == 8'(GENS), "done after the last generation");
      else               check(busy && !done, "still busy between generations");
    end
    @(negedge clk);
    check(!busy && !done, "idle after the operation");
  endtask

  initial begin
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; start = 1'b0; clear_blocked = 1'b0;
    sel1 = DIR_E; sel2 = DIR_W;
    n = 16'b1010100001100000;
    s = 16'b0000000111111110;
    e = 16'b1100001110101010;
    w = 16'b1111000010110000;
    m_blocked = '0; m_split = 0; m_prev1 = 0; m_prev2 = 0; m_primed = 0; m_last = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    check(!busy && blocked == 0 && result == 0, "idle after reset");
    // Words from the published router waveform, parents from east and west.
    run_op(DIR_E, DIR_W);
    // Stuck-at-0 and stuck-at-1 routers on north and south.
    n = 16'h0000; s = 16'hFFFF;
    run_op(DIR_N, DIR_S);
    // Random traffic until every direction is blocked and a read fails.
    for (int k = 0; k < 30 && n_fail == 0; k++) begin
      n = 16'($urandom); s = 16'($urandom); w = 16'($urandom); e = 16'($urandom);
      if (k % 3 == 2) begin n = '0; e = '1; end
      run_op(dir_e'($urandom_range(0, 3)), dir_e'($urandom_range(0, 3)));
    end
    // Clear the blocking and run once more.
    clear_blocked = 1'b1;
    @(negedge clk) clear_blocked = 1'b0;
    m_blocked = '0;
    n_clear++;
    check(blocked == 0, "clear_blocked unblocks every direction");
    n = 16'($urandom); s = 16'($urandom); w = 16'($urandom); e = 16'($urandom);
    run_op(DIR_S, DIR_N);

    $display("operations %0d: mutations %0d, picks %0d/%0d, stuck %0d, drops %0d, blocks %0d, redirects %0d, failed %0d, clears %0d, 4-clock decisions %0d",
             n_ops, n_mut, n_pick1, n_pick2, n_stuck, n_drop, n_block, n_redirect, n_fail, n_clear, n_latency);
    check(n_mut > 0, "a mutation happened");
    check(n_pick1 > 0 && n_pick2 > 0, "the wheel picked each individual");
    check(n_stuck > 0, "a stuck path was found");
    check(n_drop > 0, "a fitness drop was found");
    check(n_block > 0, "a direction was blocked");
    check(n_redirect > 0, "a read was redirected around a blocked direction");
    check(n_fail > 0, "an operation failed with every direction blocked");
    check(n_clear > 0, "blocking was cleared");
    check(n_latency > 0, "a new path decision seen exactly four clocks after start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
