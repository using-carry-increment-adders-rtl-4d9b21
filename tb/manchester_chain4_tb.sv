// Self-checking testbench for manchester_chain4.
// Applies all 256 combinations of the four group pairs. The reference for
// full[i] is found by scanning from group i downward: the range generates if
// some group generates and every group above it propagates, and propagates
// if every group propagates. One vector per time unit; a watchdog ends the
// run after 10000 time units.
module manchester_chain4_tb;
  import st_ci_pkg::*;

  pg_t grp2 [PAIRS];
  pg_t full [PAIRS];
  int  checks = 0, failures = 0;

  manchester_chain4 dut (.grp2(grp2), .full(full));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_g, exp_p, all_p;
    for (int v = 0; v < 256; v++) begin
      for (int i = 0; i < PAIRS; i++) begin
        grp2[i].g = v[2*i];
        grp2[i].p = v[2*i+1];
      end
      #1;
      for (int i = 0; i < PAIRS; i++) begin
        exp_g = 1'b0;
        all_p = 1'b1;
        for (int j = i; j >= 0; j--) begin
          if (all_p && grp2[j].g) exp_g = 1'b1;
          all_p = all_p & grp2[j].p;
        end
        exp_p = all_p;
        checks++;
        if (full[i].g !== exp_g || full[i].p !== exp_p) begin
          failures++;
          $display("FAIL v=%h i=%0d got g=%b p=%b exp g=%b p=%b",
                   v, i, full[i].g, full[i].p, exp_g, exp_p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
