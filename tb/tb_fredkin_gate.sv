// tb_fredkin_gate: exhaustive check of the 3x3 Fredkin gate.
//
// Applies all eight input triples and compares P, Q, R with a literal copy of
// the gate's truth table (controlled swap of B and C by A). It also checks
// that the eight output triples are all different (reversibility).
module tb_fredkin_gate;

  logic a, b, c, p, q, r;
  int   checks = 0;
  int   failures = 0;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  // Truth table rows {A, B, C, P, Q, R}
  localparam logic [5:0] TABLE [8] = '{
    6'b000_000, 6'b001_001, 6'b010_010, 6'b011_011,
    6'b100_100, 6'b101_110, 6'b110_101, 6'b111_111
  };

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [7:0] seen;
    seen = '0;
    foreach (TABLE[i]) begin
      {a, b, c} = TABLE[i][5:3];
      #1;
      checks++;
      if ({p, q, r} !== TABLE[i][2:0]) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b: got %b%b%b, want %b", a, b, c, p, q, r, TABLE[i][2:0]);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b%b%b produced twice: not reversible", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
