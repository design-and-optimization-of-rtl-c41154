// tb_rev_async_counter: end-to-end test of the reversible ripple up/down
// counter at its default width (no parameter override).
//
// The counter has no reset, so the test takes its settled power-up value as
// the reference. The clock has period 10 and is high first; enable and
// up_down are changed only while clk is high, one time unit after the rising
// edge. One time unit after every falling edge of clk the count must equal
// the reference, which moves by +1 (up) or -1 (down) modulo 2**WIDTH when
// enable is 1 and stays put when enable is 0: one step per clock, within the
// falling-edge time step. The count must also not move at rising edges, and
// each garbage output must be the clock of its stage (bit 0 is clk itself).
//
// Phases: counting up past the wrap to zero, holding, a direction switch made
// while enable is 0 (the count must survive it), counting down past the wrap
// to all ones, another switch back, and a stretch with random enable. Each
// mechanism (up step, down step, up wrap, down wrap, hold, direction switch)
// is counted and must occur at least once.
module tb_rev_async_counter;
  import rev_counter_pkg::*;

  localparam int unsigned WIDTH = 4;
  localparam int unsigned MOD   = 1 << WIDTH;

  logic             clk = 1'b1;
  logic             enable = 1'b0;
  logic             up_down = COUNT_UP;
  logic [WIDTH-1:0] count;
  logic [WIDTH-1:0] garbage;

  int checks = 0;
  int failures = 0;
  int n_up = 0, n_down = 0, n_wrap_up = 0, n_wrap_down = 0;
  int n_hold = 0, n_switch = 0;
  int unsigned expected;

  rev_async_counter dut (
    .clk(clk), .enable(enable), .up_down(up_down),
    .count(count), .garbage(garbage)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s (count=%0d expected=%0d en=%b ud=%b)",
               $time, what, count, expected, enable, up_down);
    end
  endtask

  // Clock of stage i as seen from outside: clk for stage 0, else bit i-1
  // xor up_down.
  function automatic logic stage_clock(int i);
    return (i == 0) ? clk : (count[i-1] ^ up_down);
  endfunction

  // One clock cycle with the given controls. Starts and ends with clk high.
  task automatic cycle(input logic en, input logic ud);
    #1;
    if (ud != up_down) begin
      n_switch++;
      up_down = ud;
    end
    enable = en;
    #2;
    check(count == WIDTH'(expected), "count moved while clk high");
    for (int i = 0; i < WIDTH; i++)
      check(garbage[i] == stage_clock(i), $sformatf("garbage[%0d] is not its stage clock", i));
    #2;
    clk = 1'b0;                                     // counting edge
    if (!en) begin
      n_hold++;
    end else if (ud == COUNT_UP) begin
      n_up++;
      if (expected == MOD - 1) n_wrap_up++;
      expected = (expected + 1) % MOD;
    end else begin
      n_down++;
      if (expected == 0) n_wrap_down++;
      expected = (expected + MOD - 1) % MOD;
    end
    #1;
    check(count == WIDTH'(expected), "count wrong after falling edge");
    #4;
    clk = 1'b1;                                     // rising edge
  endtask

  initial begin : watchdog
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    #5;
    expected = count;                               // power-up value
    repeat (2 * MOD + 3) cycle(1'b1, COUNT_UP);
    repeat (5)           cycle(1'b0, COUNT_UP);
    cycle(1'b0, COUNT_DOWN);                        // switch while held
    repeat (2 * MOD + 5) cycle(1'b1, COUNT_DOWN);
    repeat (3)           cycle(1'b0, COUNT_DOWN);
    cycle(1'b0, COUNT_UP);                          // switch back
    repeat (100) begin
      logic en;
      en = 1'($urandom_range(3) != 0);
      cycle(en, COUNT_UP);
    end
    check(n_up > 0,        "no up step exercised");
    check(n_down > 0,      "no down step exercised");
    check(n_wrap_up > 0,   "no up wrap exercised");
    check(n_wrap_down > 0, "no down wrap exercised");
    check(n_hold > 0,      "no hold exercised");
    check(n_switch > 1,    "direction switch not exercised both ways");
    $display("up=%0d down=%0d wrap_up=%0d wrap_down=%0d hold=%0d switch=%0d",
             n_up, n_down, n_wrap_up, n_wrap_down, n_hold, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
