// tb_feynman_gate: exhaustive check of the 2x2 Feynman gate.
//
// Applies all four input pairs and compares P and Q with a literal copy of
// the gate's truth table (P = A, Q = A xor B). It also checks that the four
// output pairs are all different, i.e. that the gate is reversible.
module tb_feynman_gate;

  logic a, b, p, q;
  int   checks = 0;
  int   failures = 0;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  // Truth table rows {A, B, P, Q}
  localparam logic [3:0] TABLE [4] = '{4'b00_00, 4'b01_01, 4'b10_11, 4'b11_10};

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [3:0] seen;
    seen = '0;
    foreach (TABLE[i]) begin
      {a, b} = TABLE[i][3:2];
      #1;
      checks++;
      if ({p, q} !== TABLE[i][1:0]) begin
        failures++;
        $display("FAIL a=%b b=%b: got p=%b q=%b, want %b", a, b, p, q, TABLE[i][1:0]);
      end
      checks++;
      if (seen[{p, q}]) begin
        failures++;
        $display("FAIL output %b%b produced twice: not reversible", p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
