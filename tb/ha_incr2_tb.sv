// Self-checking testbench for ha_incr2.
// Applies all 8 combinations of the intermediate sum and the carry and checks
// s = (s0 + c) mod 4. One vector per time unit; a watchdog ends the run after
// 1000 time units.
module ha_incr2_tb;
  logic [1:0] s0, s;
  logic       c;
  int         checks = 0, failures = 0;

  ha_incr2 dut (.s0(s0), .c(c), .s(s));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int i = 0; i < 8; i++) begin
      {s0, c} = 3'(i);
      #1;
      exp = (int'(s0) + int'(c)) % 4;
      checks++;
      if (s !== 2'(exp)) begin
        failures++;
        $display("FAIL s0=%0d c=%0d s=%0d exp=%0d", s0, c, s, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
