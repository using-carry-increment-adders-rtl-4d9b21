// 2-bit carry incrementer built from two chained half adders.
//
// Adds the carry c delivered by the lookahead into the 2-bit intermediate sum
// s0 of a pair: the first half adder gives s[0] = s0[0] ^ c and a carry
// s0[0] & c into the second, which gives s[1]. The carry out of the second
// half adder is dropped, since the branch carries come from the lookahead.
// Interface: s0 = intermediate sum, c = carry into the pair, s = final sum.
// Purely combinational.
module ha_incr2 (
  input  logic [1:0] s0,
  input  logic       c,
  output logic [1:0] s
);

  logic c1;

  always_comb begin
    s[0] = s0[0] ^ c;
    c1   = s0[0] & c;
    s[1] = s0[1] ^ c1;
  end

endmodule
