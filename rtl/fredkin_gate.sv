// fredkin_gate: 3x3 reversible Fredkin (controlled-swap) gate.
//
// The control input A passes through (P = A). When A is 0 the two data inputs
// go straight through (Q = B, R = C); when A is 1 they are swapped (Q = C,
// R = B). Written as sums of products this is Q = A'B xor AC and
// R = AB xor A'C. Used with A as a clock, Q is a 2:1 multiplexer, which is
// how the T flip-flop in this design builds its latches.
//
// Interface: inputs a, b, c; outputs p, q, r. Purely combinational.
// The equations are the standard Fredkin gate definition; the port names are
// this design's choice.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = (~a & b) ^ (a & c);
    r = (a & b) ^ (~a & c);
  end

endmodule
