// Self-checking testbench for rca2.
// Applies all 16 operand combinations and checks s0 = (a + b) mod 4. One
// vector per time unit; a watchdog ends the run after 1000 time units.
module rca2_tb;
  logic [1:0] a, b, s0;
  int         checks = 0, failures = 0;

  rca2 dut (.a(a), .b(b), .s0(s0));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      exp = (int'(a) + int'(b)) % 4;
      checks++;
      if (s0 !== 2'(exp)) begin
        failures++;
        $display("FAIL a=%0d b=%0d s0=%0d exp=%0d", a, b, s0, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
