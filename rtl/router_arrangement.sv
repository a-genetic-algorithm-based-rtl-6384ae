// router_arrangement: input stage of the router that supplies the two parent
// node words to the genetic-algorithm datapath.
//
// The router has four 16-bit direction ports n, s, w, e. Two select lines,
// sel1 and sel2, name the directions whose words become parent 1 and parent 2.
// On a clock edge with rd high the two selected port words are captured into
// the parent registers s1 and s2; op and op2 show them. On a clock edge with
// wr high the word on din (an offspring chosen by the selection stage) is
// written into s1 instead, so that the next generation breeds from it; wr has
// priority over rd. A direction marked in blocked[] (a router found damaged by
// the fault blocks) is rejected: the select moves on to the next direction in
// code order that is not blocked. When all four are blocked a read changes
// nothing and rd_fail pulses high for one cycle.
//
// Timing: op/op2 change one clock after rd or wr is seen; reset is
// synchronous and active high and clears both parent registers.
//
// From the document: the n/s/w/e ports, the two select lines, rd and wr, the
// op and s1 names and that select code 00 reads the east port. The meaning of
// the other select codes, the second output op2, wr as the offspring
// write-back, blocking and reset are this design's own choices.
module router_arrangement
  import ga_pkg::*;
(
  input  logic             clk,
  input  logic             reset,
  input  logic             rd,
  input  logic             wr,
  input  dir_e             sel1,
  input  dir_e             sel2,
  input  chrom_t           n,
  input  chrom_t           s,
  input  chrom_t           w,
  input  chrom_t           e,
  input  chrom_t           din,
  input  logic [N_DIR-1:0] blocked,   // bit index = select code
  output chrom_t           op,        // parent 1
  output chrom_t           op2,       // parent 2
  output dir_e             dir1,      // direction parent 1 was read from
  output dir_e             dir2,      // direction parent 2 was read from
  output logic             rd_fail
);

  chrom_t s1, s2;
  chrom_t port [N_DIR];
  dir_e   eff1, eff2;
  logic   ok1, ok2;

  always_comb begin
    port[DIR_E] = e;
    port[DIR_W] = w;
    port[DIR_N] = n;
    port[DIR_S] = s;
  end

  // First direction, starting at the requested one, that is not blocked.
  function automatic void pick(input dir_e req, input logic [N_DIR-1:0] blk,
                               output dir_e eff, output logic ok);
    logic [1:0] cand;
    eff = req;
    ok  = 1'b0;
    for (int k = N_DIR - 1; k >= 0; k--) begin
      cand = 2'(req) + 2'(k);
      if (!blk[cand]) begin
        eff = dir_e'(cand);
        ok  = 1'b1;
      end
    end
  endfunction

  always_comb begin
    pick(sel1, blocked, eff1, ok1);
    pick(sel2, blocked, eff2, ok2);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      s1      <= '0;
      s2      <= '0;
      dir1    <= DIR_E;
      dir2    <= DIR_E;
      rd_fail <= 1'b0;
    end else begin
      rd_fail <= 1'b0;
      if (wr) begin
        s1 <= din;
      end else if (rd) begin
        if (ok1 && ok2) begin
          s1   <= port[eff1];
          s2   <= port[eff2];
          dir1 <= eff1;
          dir2 <= eff2;
        end else begin
          rd_fail <= 1'b1;
        end
      end
    end
  end

  assign op  = s1;
  assign op2 = s2;

  // A read never takes a blocked direction, and fails only with all blocked.
  a_unblocked: assert property (@(posedge clk) disable iff (reset)
                                (ok1 && ok2) |-> (!blocked[eff1] && !blocked[eff2]));
  a_rd_fail:   assert property (@(posedge clk) disable iff (reset)
                                (rd && !wr) |=> (rd_fail == &$past(blocked)));

endmodule
