// 2-bit generate/propagate grouping.
//
// Forms bitwise generate g = a & b and propagate p = a | b for two adjacent
// bits, then merges them into the group pair for the two bits:
//   g(k+1:k) = g(k+1) | p(k+1) & g(k),  p(k+1:k) = p(k+1) & p(k).
// This is the static-logic first stage of each branch; the inclusive-OR
// propagate follows the described design (the sum path uses XOR in rca2).
// Bundling g and p in a struct is this design's choice.
// Interface: a, b = the two operand bits (bit 0 is the lower), grp = group
// pair. Purely combinational.
module pg_group2
  import st_ci_pkg::*;
(
  input  logic [1:0] a,
  input  logic [1:0] b,
  output pg_t        grp
);

  pg_t lo, hi;

  always_comb begin
    lo.g = a[0] & b[0];
    lo.p = a[0] | b[0];
    hi.g = a[1] & b[1];
    hi.p = a[1] | b[1];
    grp  = pg_merge(hi, lo);
  end

endmodule
