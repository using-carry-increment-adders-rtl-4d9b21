// 64-bit spanning-tree adder with carry-increment branches.
//
// The operands are cut into WIDTH/8 branches of 8 bits (st_ci_branch8). Each
// branch forms its own group generate/propagate and sums at once; the only
// signal between branches is the carry-out c8 of one branch, which is the
// carry-in of the next (c8, c16, ..., c56), so carries flow forward only and
// c64 is the adder carry-out. Inside a branch the carry-in reaches the sums
// through one AND-OR level and a 2-bit incrementer.
// Interface: sum = (a + b + cin) mod 2^WIDTH, cout = carry out of the top
// bit, carries[i] = carry into bit 2i+2 (c2, c4, ..., c_WIDTH). Purely
// combinational: no clock, no registers.
// WIDTH defaults to 64 as described and must be a multiple of 8. The carries
// output, giving the every-other-bit carries the tree forms anyway, is this
// design's choice.
module st_ci_adder64
  import st_ci_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic               cin,
  output logic [WIDTH-1:0]   sum,
  output logic               cout,
  output logic [WIDTH/2-1:0] carries
);

  localparam int unsigned NBR = WIDTH / BRANCH_W;

  logic [NBR:0] c_br;   // c_br[k] = carry into branch k, c_br[NBR] = cout

  assign c_br[0] = cin;

  for (genvar k = 0; k < NBR; k++) begin : g_branch
    logic [PAIRS-1:0] c;

    st_ci_branch8 u_branch (
      .a   (a[BRANCH_W*k +: BRANCH_W]),
      .b   (b[BRANCH_W*k +: BRANCH_W]),
      .cin (c_br[k]),
      .sum (sum[BRANCH_W*k +: BRANCH_W]),
      .c   (c)
    );

    assign c_br[k+1]                 = c[PAIRS-1];
    assign carries[PAIRS*k +: PAIRS] = c;
  end

  assign cout = c_br[NBR];

  if (WIDTH % BRANCH_W != 0 || WIDTH == 0) begin : g_width_check
    $error("st_ci_adder64: WIDTH must be a positive multiple of 8");
  end

endmodule
