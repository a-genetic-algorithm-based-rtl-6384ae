// gp_compare: 4-bit magnitude comparator built from per-bit generate and
// propagate terms, in the manner of a carry-lookahead chain.
//
// For bit i: g[i] = a[i] & ~b[i] ("a is greater at this bit") and
// p[i] = ~(a[i] ^ b[i]) ("the bits are equal"). Scanning from the top bit,
// a > b when some bit generates and every bit above it propagates; a < b
// likewise with the roles swapped; a == b when all bits propagate. Purely
// combinational.
//
// The per-bit g and p signals are named after the g1..g4 and p1..p4 signals
// of the document's fault-analysis waveform; what they compute there is not
// stated, and this comparator is this design's reading of them.
module gp_compare #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] g,
  output logic [W-1:0] p,
  output logic         gt,
  output logic         lt,
  output logic         eq
);

  logic [W-1:0] k;   // b greater at this bit
  logic         all_p;

  always_comb begin
    g = a & ~b;
    k = b & ~a;
    p = ~(a ^ b);
    gt    = 1'b0;
    lt    = 1'b0;
    all_p = 1'b1;
    for (int i = W - 1; i >= 0; i--) begin
      gt    = gt | (all_p & g[i]);
      lt    = lt | (all_p & k[i]);
      all_p = all_p & p[i];
    end
    eq = all_p;
  end

endmodule
