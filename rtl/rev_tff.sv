// rev_tff: negative-edge-triggered T flip-flop made only of reversible gates.
//
// Five gates: two Fredkin gates and three Feynman gates, with two constant-0
// inputs and three garbage outputs (g1, g2 and the clock copy clk_out).
//
//   * Master latch: a Fredkin gate with A = clk selects, on Q, its C input
//     (the new data) while clk is 1 and its B input (its own stored value)
//     while clk is 0. A Feynman gate with B = 0 fans that Q out into a copy
//     for the slave and a copy fed back to B, which closes the latch loop.
//   * Slave latch: a second Fredkin gate, clocked by the master's P output
//     (a copy of clk), selects the master's value while clk is 0 and its own
//     fed-back value while clk is 1. Its Feynman fan-out gives the flip-flop
//     output and the feedback copy.
//   * Toggle: a third Feynman gate takes A = q and B = t; its P output is q
//     and its Q output, q xor t, is the master's data.
//
// The master is open while clk is high and the slave while clk is low, so q
// takes the value q xor t on each falling edge of clk: it toggles when t is 1
// and holds when t is 0. t only matters at the falling edge. q changes in the
// same time step as the falling edge (the gates have no delay).
//
// The storage is the gate-level feedback itself, as in the reversible
// circuit, so lint and synthesis report combinational loops (two per
// flip-flop, one per latch) and no flip-flop cells: this is intended. There is
// no reset, and the flip-flop powers up in whatever state the loops settle to.
//
// Interface: clk, t in; q out; clk_out, g1, g2 are the garbage outputs.
// The gate count and types, the negative-edge behaviour and the garbage and
// constant counts follow the published design; the exact pin of each Fredkin
// gate that carries data or feedback is this design's reading of its drawing.
module rev_tff (
  input  logic clk,
  input  logic t,
  output logic q,
  output logic clk_out,
  output logic g1,
  output logic g2
);

  logic clk_m;     // clock copy passed from master to slave (master P)
  logic m_q;       // master Fredkin Q: the master latch value
  logic m_out;     // master value forwarded to the slave
  logic m_fb;      // master value fed back into the master
  logic s_q;       // slave Fredkin Q: the slave latch value
  logic s_out;     // slave value towards the toggle gate
  logic s_fb;      // slave value fed back into the slave
  logic d_next;    // q xor t, the master's data

  // Master latch: Q = clk ? d_next : m_fb
  fredkin_gate u_master (
    .a(clk), .b(m_fb), .c(d_next),
    .p(clk_m), .q(m_q), .r(g1)
  );

  feynman_gate u_master_fanout (
    .a(m_q), .b(1'b0),
    .p(m_out), .q(m_fb)
  );

  // Slave latch: Q = clk ? s_fb : m_out
  fredkin_gate u_slave (
    .a(clk_m), .b(m_out), .c(s_fb),
    .p(clk_out), .q(s_q), .r(g2)
  );

  feynman_gate u_slave_fanout (
    .a(s_q), .b(1'b0),
    .p(s_out), .q(s_fb)
  );

  // Toggle: P = q, Q = q xor t
  feynman_gate u_toggle (
    .a(s_out), .b(t),
    .p(q), .q(d_next)
  );

endmodule
