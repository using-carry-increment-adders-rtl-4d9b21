// Manchester carry chain of one 8-bit branch.
//
// Takes the four 2-bit group pairs (1:0), (3:2), (5:4), (7:6) and produces the
// full groups that start at bit 0:
//   (3:0) = (3:2) o (1:0),  (5:0) = (5:4) o (3:0),  (7:0) = (7:6) o (5:0)
// with a forward chain of three Manchester cells, so a full group never waits
// on a more significant one. The chain is four groups long, as described; the
// cells model the logic function of the pass-transistor chain.
// Output index 0 is the (1:0) pair passed through, so that the carry block
// receives all four full groups in one array (this design's choice).
// Interface: grp2[i] covers bits 2i+1:2i, full[i] covers bits 2i+1:0.
// Purely combinational.
module manchester_chain4
  import st_ci_pkg::*;
(
  input  pg_t grp2 [st_ci_pkg::PAIRS],
  output pg_t full [st_ci_pkg::PAIRS]
);

  assign full[0] = grp2[0];

  for (genvar i = 1; i < PAIRS; i++) begin : g_cell
    manchester_cell u_cell (
      .grp  (grp2[i]),
      .pin  (full[i-1]),
      .pout (full[i])
    );
  end

endmodule
