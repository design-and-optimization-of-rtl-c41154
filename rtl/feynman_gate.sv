// feynman_gate: 2x2 reversible Feynman (controlled-NOT) gate.
//
// The gate passes its control input through (P = A) and flips the target
// input when the control is 1 (Q = A xor B). Tying B to 0 makes it a
// reversible fan-out: P and Q are both copies of A. Tying B to a signal makes
// Q the XOR of the two. The mapping (A,B) -> (P,Q) is a bijection, so the
// inputs can always be recovered from the outputs.
//
// Interface: inputs a, b; outputs p, q. Purely combinational, no clock.
// The equations are the standard Feynman gate definition; only the port
// names are this design's choice.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  always_comb begin
    p = a;
    q = a ^ b;
  end

endmodule
