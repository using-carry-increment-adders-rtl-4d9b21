// Self-checking testbench for pg_group2.
// Applies all 16 combinations of the two operand bit pairs and compares the
// group pair with its definition from addition: the pair generates a carry
// when a + b >= 4 with no carry in, and propagates one when a + b >= 3
// (the inclusive-OR propagate is also 1 when the pair generates, which is
// checked as g | (a + b == 3)). One vector per time unit; a watchdog ends
// the run after 1000 time units.
module pg_group2_tb;
  import st_ci_pkg::*;

  logic [1:0] a, b;
  pg_t        grp;
  int         checks = 0, failures = 0;

  pg_group2 dut (.a(a), .b(b), .grp(grp));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum;
    logic exp_g, exp_p;
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      sum   = int'(a) + int'(b);
      exp_g = (sum >= 4);
      // OR-propagate: both bits have at least one operand bit set
      exp_p = (a[1] | b[1]) & (a[0] | b[0]);
      checks++;
      if (grp.g !== exp_g || grp.p !== exp_p) begin
        failures++;
        $display("FAIL a=%b b=%b g=%b p=%b exp g=%b p=%b", a, b, grp.g, grp.p, exp_g, exp_p);
      end
      // Carry-out of the pair for carry-in 1 must be g | p
      checks++;
      if ((grp.g | grp.p) !== (sum + 1 >= 4)) begin
        failures++;
        $display("FAIL carry-in-1 a=%b b=%b", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
