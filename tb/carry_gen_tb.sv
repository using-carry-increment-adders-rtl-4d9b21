// Self-checking testbench for carry_gen.
// Applies all 512 combinations of the four full groups and the carry-in and
// checks each carry against a truth-table reading: the carry is 1 when the
// group generates, or when it propagates and the carry-in is 1. One vector
// per time unit; a watchdog ends the run after 10000 time units.
module carry_gen_tb;
  import st_ci_pkg::*;

  pg_t              full [PAIRS];
  logic             cin;
  logic [PAIRS-1:0] c;
  int               checks = 0, failures = 0;

  carry_gen dut (.full(full), .cin(cin), .c(c));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 512; v++) begin
      for (int i = 0; i < PAIRS; i++) begin
        full[i].g = v[2*i];
        full[i].p = v[2*i+1];
      end
      cin = v[8];
      #1;
      for (int i = 0; i < PAIRS; i++) begin
        case ({full[i].g, full[i].p, cin})
          3'b000, 3'b001, 3'b010: exp = 1'b0;
          default:                exp = 1'b1;
        endcase
        checks++;
        if (c[i] !== exp) begin
          failures++;
          $display("FAIL v=%h i=%0d c=%b exp=%b", v, i, c[i], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
