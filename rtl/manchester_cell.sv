// One Manchester carry cell: extends a full group downward to bit 0.
//
// Given the group pair of a range (grp) and the full group of everything
// below it (pin), outputs the full group of the combined range:
//   g_out = g | p & g_in,  p_out = p & p_in.
// In a custom layout this is pass-transistor logic; here only its logic
// function is written. Purely combinational.
module manchester_cell
  import st_ci_pkg::*;
(
  input  pg_t grp,
  input  pg_t pin,
  output pg_t pout
);

  assign pout = pg_merge(grp, pin);

endmodule
