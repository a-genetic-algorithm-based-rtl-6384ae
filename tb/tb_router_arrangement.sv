// tb_router_arrangement: self-checking test of the router input stage.
//
// Replays the published read (select code 00 returns the east word
// 1100001110101010 on op), then checks every select pair, the one-clock read
// latency, the write-back of din on wr and its priority over rd, hold when
// neither is high, the skipping of blocked directions, rd_fail when all four
// are blocked, and reset.
module tb_router_arrangement;
  import ga_pkg::*;

  logic clk = 1'b0;
  logic reset, rd, wr, rd_fail;
  dir_e sel1, sel2, dir1, dir2;
  chrom_t n, s, w, e, din, op, op2;
  logic [3:0] blocked;
  int checks = 0, failures = 0;

  router_arrangement dut (.clk, .reset, .rd, .wr, .sel1, .sel2, .n, .s, .w, .e,
                          .din, .blocked, .op, .op2, .dir1, .dir2, .rd_fail);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

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

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; rd = 1'b0; wr = 1'b0; blocked = '0; din = '0;
    sel1 = DIR_E; sel2 = DIR_W;
    n = 16'b1010100001100000;
    s = 16'b0000000111111110;
    e = 16'b1100001110101010;
    w = 16'b1111000010110000;
    @(posedge clk);
    @(negedge clk) reset = 1'b0;
    check(op == 16'h0 && op2 == 16'h0, "cleared by reset");
    rd = 1'b1;
    #1 check(op == 16'h0, "no change before the clock");
    @(negedge clk) rd = 1'b0;
    check(op == 16'b1100001110101010, "published read: sel1=00 gives east word");
    check(op2 == w && dir1 == DIR_E && dir2 == DIR_W, "second parent from west");
    // All select pairs with random words.
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        n = 16'($urandom); s = 16'($urandom); w = 16'($urandom); e = 16'($urandom);
        sel1 = dir_e'(a); sel2 = dir_e'(b); rd = 1'b1;
        @(negedge clk) rd = 1'b0;
        check(op == port_of(a) && op2 == port_of(b), $sformatf("read %0d/%0d", a, b));
        begin
          chrom_t o1, o2;
          o1 = op; o2 = op2;
          n = ~n; s = ~s; w = ~w; e = ~e;
          @(negedge clk);
          check(op == o1 && op2 == o2, "parents hold while rd and wr are low");
        end
      end
    // Write-back, with priority over a read.
    din = 16'h5A5A; wr = 1'b1; rd = 1'b1;
    begin
      chrom_t keep2;
      keep2 = op2;
      @(negedge clk) wr = 1'b0; rd = 1'b0;
      check(op == 16'h5A5A && op2 == keep2, "wr writes din into parent 1 only");
    end
    // Blocked directions are skipped.
    for (int t = 0; t < 60; t++) begin
      int x1, x2;
      n = 16'($urandom); s = 16'($urandom); w = 16'($urandom); e = 16'($urandom);
      blocked = 4'($urandom);
      sel1 = dir_e'($urandom_range(0, 3)); sel2 = dir_e'($urandom_range(0, 3));
      x1 = skip(int'(sel1), blocked); x2 = skip(int'(sel2), blocked);
      begin
        chrom_t o1, o2;
        o1 = op; o2 = op2;
        rd = 1'b1;
        @(negedge clk) rd = 1'b0;
        if (x1 < 0) begin
          check(rd_fail && op == o1 && op2 == o2, "all blocked: rd_fail and hold");
        end else begin
          check(!rd_fail && op == port_of(x1) && op2 == port_of(x2) &&
                int'(dir1) == x1 && int'(dir2) == x2,
                $sformatf("blocked %b sel %0d/%0d", blocked, sel1, sel2));
        end
      end
    end
    blocked = 4'hF; rd = 1'b1;
    @(negedge clk) rd = 1'b0;
    check(rd_fail, "rd_fail when every direction is blocked");
    @(negedge clk);
    check(!rd_fail, "rd_fail is a pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
