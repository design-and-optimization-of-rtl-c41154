// tb_rev_tff: self-checking test of the reversible negative-edge T flip-flop.
//
// The flip-flop has no reset, so the test first lets it settle and takes its
// power-up value as the reference. Each clock cycle (period 10, high first)
// it then:
//   * sets t to a random value while clk is high,
//   * checks that q has not moved before the falling edge,
//   * checks one time unit after the falling edge that q equals the
//     reference (toggled when t was 1, held when t was 0),
//   * changes t again while clk is low and checks that q ignores it, and
//   * checks that the rising edge does not change q.
// clk_out must follow clk at all times. Toggles and holds are counted and
// each must occur at least once.
module tb_rev_tff;

  localparam int CYCLES = 200;

  logic clk = 1'b1;
  logic t   = 1'b0;
  logic q, clk_out, g1, g2;

  int checks = 0;
  int failures = 0;
  int n_toggle = 0;
  int n_hold = 0;

  rev_tff dut (.clk(clk), .t(t), .q(q), .clk_out(clk_out), .g1(g1), .g2(g2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s (q=%b t=%b clk=%b)", $time, what, q, t, clk);
    end
  endtask

  initial begin : watchdog
    #(10 * CYCLES + 100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic expected;
    #3;
    expected = q;                               // power-up state
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      // clk is high here
      t = 1'($urandom_range(1));
      #1;
      check(q == expected, "q moved while clk high");
      check(clk_out == clk, "clk_out differs from clk (high)");
      #1;
      clk = 1'b0;                               // falling edge
      if (t) begin expected = ~expected; n_toggle++; end
      else   begin n_hold++; end
      #1;
      check(q == expected, "q wrong after falling edge");
      check(clk_out == clk, "clk_out differs from clk (low)");
      t = ~t;                                   // must be ignored while low
      #3;
      check(q == expected, "q moved while clk low");
      #1;
      clk = 1'b1;                               // rising edge
      #1;
      check(q == expected, "q moved at rising edge");
      #2;
    end
    check(n_toggle > 0, "no toggle exercised");
    check(n_hold > 0, "no hold exercised");
    $display("toggles=%0d holds=%0d", n_toggle, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
