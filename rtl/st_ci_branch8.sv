// One 8-bit branch of the spanning-tree carry-increment adder.
//
// Two halves work in parallel. The lookahead half turns a and b into four
// 2-bit group pairs (pg_group2), chains them into full groups from bit 0 in
// one Manchester chain (manchester_chain4), and combines those with cin into
// the carries c2, c4, c6 and the carry-out c8 (carry_gen). The sum half adds
// each bit pair with a 2-bit ripple adder whose carry-in is 0 (rca2); once a
// pair's carry (cin, c2, c4 or c6) is known, a 2-bit half-adder incrementer
// (ha_incr2) adds it in to give the final sum bits.
// Interface: a, b, cin in; sum = (a + b + cin) mod 256; c = {c8, c6, c4, c2},
// c[3] being the branch carry-out. Purely combinational.
// The structure follows the described branch; exposing the internal carries
// as an output is this design's choice.
module st_ci_branch8
  import st_ci_pkg::*;
(
  input  logic [st_ci_pkg::BRANCH_W-1:0] a,
  input  logic [st_ci_pkg::BRANCH_W-1:0] b,
  input  logic                           cin,
  output logic [st_ci_pkg::BRANCH_W-1:0] sum,
  output logic [st_ci_pkg::PAIRS-1:0]    c
);

  pg_t                 grp2 [PAIRS];
  pg_t                 full [PAIRS];
  logic [PAIRS-1:0]    c_in_pair;   // carry into each pair: cin, c2, c4, c6

  // Lookahead half
  for (genvar i = 0; i < PAIRS; i++) begin : g_pg
    pg_group2 u_pg (
      .a   (a[2*i +: 2]),
      .b   (b[2*i +: 2]),
      .grp (grp2[i])
    );
  end

  manchester_chain4 u_chain (
    .grp2 (grp2),
    .full (full)
  );

  carry_gen u_carry (
    .full (full),
    .cin  (cin),
    .c    (c)
  );

  assign c_in_pair = {c[PAIRS-2:0], cin};

  // Sum half
  for (genvar i = 0; i < PAIRS; i++) begin : g_sum
    logic [1:0] s0;

    rca2 u_rca (
      .a  (a[2*i +: 2]),
      .b  (b[2*i +: 2]),
      .s0 (s0)
    );

    ha_incr2 u_inc (
      .s0 (s0),
      .c  (c_in_pair[i]),
      .s  (sum[2*i +: 2])
    );
  end

endmodule
