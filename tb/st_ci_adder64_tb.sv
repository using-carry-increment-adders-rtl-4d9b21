// End-to-end self-checking testbench for st_ci_adder64 at its default size
// (64 bits, eight branches).
//
// Vectors: directed corner cases (zeros, all ones, carry rippling through the
// whole adder from cin, a carry generated in one branch that propagates
// through all branches above it, a single bit in every position), then random
// vectors in three styles: uniform operands, b close to ~a so that long
// propagate runs cross branch boundaries, and sparse operands.
// Each vector is checked against 65-bit integer addition: the sum, the
// carry-out, and every even-position carry (carry into bit k = a^b^sum at k).
// The testbench also counts, from the operands alone, how often each
// mechanism of the adder was exercised and fails if any never occurred:
//   gen      a branch produces its carry-out by itself (group generate)
//   prop     a branch passes an incoming carry through all 8 bits
//   chain    cin ripples through all 64 bits to the carry-out
//   incr     a 2-bit incrementer receives a carry of 1
//   wrap     an incrementer adds 1 to an intermediate sum of 3
//   drop     a 2-bit ripple adder overflows and its carry-out is discarded
//   cout     the adder carry-out is 1
// One vector per time unit; a watchdog ends the run after 1,000,000 units.
module st_ci_adder64_tb;
  localparam int unsigned W  = 64;
  localparam int          NR = 200000;

  logic [W-1:0]   a, b, sum;
  logic           cin, cout;
  logic [W/2-1:0] carries;
  int             checks = 0, failures = 0;

  typedef enum int {M_GEN, M_PROP, M_CHAIN, M_INCR, M_WRAP, M_DROP, M_COUT, M_N} mech_e;
  int unsigned    seen [M_N];

  st_ci_adder64 dut (
    .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .carries(carries)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rand64();
    return {$urandom(), $urandom()};
  endfunction

  task automatic apply(input logic [W-1:0] va, input logic [W-1:0] vb, input logic vc);
    logic [W:0]   ref_full;
    logic [W:0]   cvec;       // cvec[k] = carry into bit k, cvec[W] = carry-out
    logic [8:0]   bsum;
    logic [2:0]   psum;
    logic [1:0]   ps0;
    a   = va;
    b   = vb;
    cin = vc;
    #1;
    ref_full = {1'b0, va} + {1'b0, vb} + {{W{1'b0}}, vc};
    cvec     = {ref_full[W], (va ^ vb ^ ref_full[W-1:0])};
    checks++;
    if (sum !== ref_full[W-1:0] || cout !== ref_full[W]) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h cin=%b sum=%h cout=%b exp %h %b",
                 va, vb, vc, sum, cout, ref_full[W-1:0], ref_full[W]);
    end
    for (int i = 0; i < W/2; i++) begin
      checks++;
      if (carries[i] !== cvec[2*i+2]) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h b=%h cin=%b carry c%0d=%b exp %b",
                   va, vb, vc, 2*i+2, carries[i], cvec[2*i+2]);
      end
    end
    // Mechanism coverage, worked out from the operands
    for (int k = 0; k < W/8; k++) begin
      bsum = {1'b0, va[8*k +: 8]} + {1'b0, vb[8*k +: 8]};
      if (bsum[8]) seen[M_GEN]++;
      if ((va[8*k +: 8] ^ vb[8*k +: 8]) == 8'hFF && cvec[8*k]) seen[M_PROP]++;
    end
    if ((va ^ vb) == {W{1'b1}} && vc) seen[M_CHAIN]++;
    for (int i = 0; i < W/2; i++) begin
      psum = {1'b0, va[2*i +: 2]} + {1'b0, vb[2*i +: 2]};
      ps0  = psum[1:0];
      if (psum[2]) seen[M_DROP]++;
      if (cvec[2*i]) begin
        seen[M_INCR]++;
        if (ps0 == 2'b11) seen[M_WRAP]++;
      end
    end
    if (ref_full[W]) seen[M_COUT]++;
  endtask

  initial begin
    logic [W-1:0] ra, rb, m;
    for (int i = 0; i < M_N; i++) seen[i] = 0;

    // Directed corner cases
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '0, 1'b1);                         // cin ripples through all 64 bits
    apply({W{1'b1}}, {{(W-1){1'b0}}, 1'b1}, 1'b0);
    apply(64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAA, 1'b1);
    for (int k = 0; k < W/8; k++) begin
      // carry generated at the bottom of branch k, propagating to the top
      ra = '1 << (8*k);
      rb = {{(W-1){1'b0}}, 1'b1} << (8*k);
      apply(ra, rb, 1'b0);
    end
    for (int k = 0; k < W; k++) begin
      apply({{(W-1){1'b0}}, 1'b1} << k, '1, 1'b0);
      apply({{(W-1){1'b0}}, 1'b1} << k, {{(W-1){1'b0}}, 1'b1} << k, 1'b1);
    end

    // Random vectors
    for (int n = 0; n < NR; n++) begin
      ra = rand64();
      case (n % 3)
        0: rb = rand64();
        1: begin
          m  = rand64() & rand64() & rand64() & rand64();
          rb = ~ra ^ m;                          // long propagate runs
        end
        default: begin
          ra = ra & rand64() & rand64();
          rb = rand64() & rand64() & rand64();
        end
      endcase
      apply(ra, rb, 1'($urandom()));
    end

    for (int i = 0; i < M_N; i++) begin
      mech_e e;
      e = mech_e'(i);
      $display("mechanism %-8s seen %0d times", e.name(), seen[i]);
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never exercised", e.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
