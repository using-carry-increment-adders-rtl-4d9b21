// Self-checking testbench for st_ci_branch8.
// Applies all 2^17 combinations of a, b and cin. The sum is checked against
// integer addition, and each carry c2, c4, c6, c8 against the carry out of the
// integer sum of the low 2, 4, 6 and 8 bits. One vector per time unit; a
// watchdog ends the run after 200000 time units.
module st_ci_branch8_tb;
  logic [7:0] a, b, sum;
  logic       cin;
  logic [3:0] c;
  int         checks = 0, failures = 0;

  st_ci_branch8 dut (.a(a), .b(b), .cin(cin), .sum(sum), .c(c));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total, part, mask;
    for (int v = 0; v < (1 << 17); v++) begin
      {cin, a, b} = 17'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      checks++;
      if (sum !== 8'(total)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h cin=%b sum=%h exp=%h", a, b, cin, sum, total & 255);
      end
      for (int i = 0; i < 4; i++) begin
        mask = (1 << (2*i + 2)) - 1;
        part = (int'(a) & mask) + (int'(b) & mask) + int'(cin);
        checks++;
        if (c[i] !== (part > mask)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%h cin=%b c[%0d]=%b", a, b, cin, i, c[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
