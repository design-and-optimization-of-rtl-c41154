// rev_async_counter: ripple (asynchronous) up/down counter built from
// reversible T flip-flops and Feynman gates.
//
// WIDTH stages of rev_tff form the counter. Every stage's T input is tied to
// enable, so all stages toggle on their own clock's falling edge while enable
// is 1 and hold while it is 0. Stage 0 is clocked by clk. Between stage i and
// stage i+1 sits a Feynman gate with A = q of stage i and B = up_down: its P
// output is count bit i and its Q output, q(i) xor up_down, clocks stage i+1.
//
//   up_down = 0 (COUNT_UP):   stage i+1 toggles when bit i falls 1 -> 0,
//                             so the value counts up by one per clk fall.
//   up_down = 1 (COUNT_DOWN): stage i+1 toggles when bit i rises 0 -> 1,
//                             so the value counts down by one per clk fall.
//
// Timing: the counter steps on the falling edge of clk. The carry ripples
// through the stages; in this zero-delay model the whole ripple settles in
// the same time step. enable is sampled by each stage at its own clock edge,
// so change it while clk is high. Changing up_down flips every inter-stage
// clock at once: with enable = 1 this can toggle higher stages, so switch
// direction while enable is 0 (then the count is kept).
//
// Interface: clk, enable, up_down in; count[WIDTH-1:0] out, count[0] being the
// stage clocked by clk; garbage[WIDTH-1:0] are the stages' clock copies.
// There is no reset. The stage chain, the enable and direction wiring and the
// 4-bit default follow the published design; the bit order of count and the
// direction encoding (0 = up) are this design's reading of it. The stages'
// storage is gate-level feedback, so tools report combinational loops and
// each stage's clock is a logic signal: both are inherent in a ripple counter
// of reversible gates.
module rev_async_counter
  import rev_counter_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             enable,
  input  logic             up_down,
  output logic [WIDTH-1:0] count,
  output logic [WIDTH-1:0] garbage
);

  logic [WIDTH-1:0] stage_clk;   // clock of each stage
  logic [WIDTH-1:0] stage_q;     // output of each stage

  count_dir_e dir;               // direction, named by the package encoding

  assign dir          = count_dir_e'(up_down);
  assign stage_clk[0] = clk;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    logic g1_unused, g2_unused;  // flip-flop garbage outputs, not used

    rev_tff u_tff (
      .clk(stage_clk[i]), .t(enable),
      .q(stage_q[i]), .clk_out(garbage[i]),
      .g1(g1_unused), .g2(g2_unused)
    );

    if (i < WIDTH - 1) begin : g_link
      // P: count bit, Q: next stage's clock
      feynman_gate u_link (
        .a(stage_q[i]), .b(dir == COUNT_DOWN),
        .p(count[i]), .q(stage_clk[i+1])
      );
    end else begin : g_last
      assign count[i] = stage_q[i];
    end
  end

endmodule
