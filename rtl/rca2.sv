// 2-bit ripple-carry adder with carry-in fixed at 0.
//
// Produces the intermediate sum s0 = (a + b) mod 4 of one bit pair. The low
// cell, with its carry-in at 0, is a half adder; its carry ripples into the
// full-adder sum of the high cell. The carry-out of the pair is not formed:
// the lookahead already accounts for it, and adding it here would count it
// twice. Interface: a, b = operand bits of the pair, s0 = intermediate sum.
// Purely combinational.
module rca2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [1:0] s0
);

  logic c1;

  always_comb begin
    s0[0] = a[0] ^ b[0];
    c1    = a[0] & b[0];
    s0[1] = a[1] ^ b[1] ^ c1;
  end

endmodule
