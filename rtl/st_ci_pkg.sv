// Shared types of the spanning-tree carry-increment adder.
//
// pg_t bundles a generate/propagate pair for a bit range. A range i:j
// generates a carry when g is 1 and passes an incoming carry when p is 1;
// two adjacent ranges merge as g = g_hi | p_hi & g_lo, p = p_hi & p_lo.
// BRANCH_W is the width of one branch of the tree (8 bits) and PAIRS the
// number of 2-bit carry-increment groups in it (4).
package st_ci_pkg;

  localparam int unsigned BRANCH_W = 8;
  localparam int unsigned PAIRS    = BRANCH_W / 2;

  typedef struct packed {
    logic g;
    logic p;
  } pg_t;

  // Merge an upper range with the adjacent lower range (group G/P operator).
  function automatic pg_t pg_merge(pg_t hi, pg_t lo);
    pg_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
