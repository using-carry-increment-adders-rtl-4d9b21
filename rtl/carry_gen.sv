// Carry generator of one 8-bit branch.
//
// Combines each full group with the branch carry-in:
//   c2 = g(1:0) | p(1:0) & cin,  c4 = g(3:0) | p(3:0) & cin,
//   c6 = g(5:0) | p(5:0) & cin,  c8 = g(7:0) | p(7:0) & cin.
// c2, c4 and c6 drive the carry-increment stage of the branch; c8 is the
// branch carry-out and becomes the carry-in of the next branch.
// Interface: full[i] covers bits 2i+1:0; c[i] is the carry into bit 2i+2.
// Purely combinational.
module carry_gen
  import st_ci_pkg::*;
(
  input  pg_t                         full [st_ci_pkg::PAIRS],
  input  logic                        cin,
  output logic [st_ci_pkg::PAIRS-1:0] c
);

  always_comb begin
    for (int i = 0; i < PAIRS; i++) begin
      c[i] = full[i].g | (full[i].p & cin);
    end
  end

endmodule
