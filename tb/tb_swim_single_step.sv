// tb_swim_single_step: self-checking test of the SWIM RUN/STEP logic.
// Checks: RUN* low in RUN mode whatever the step switch does; the switch to
// STEP mode taking effect at the next falling AS*; in STEP mode RUN* high
// during a bus cycle until the step switch is pressed, low after the press,
// high again at the next cycle even if the switch is still held; a press
// between bus cycles has no effect; the switch back to RUN acting at once.
// Switch contacts bounce on every throw.
`timescale 1ns/1ps
module tb_swim_single_step;
  logic as_n, stepmode_n, runmode_n, advance_n, hold_n, run_n, step_mode;
  int checks = 0, failures = 0, steps = 0;

  swim_single_step dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic bounce(ref logic contact, input logic other_was);
    for (int b = 0; b < 3; b++) begin
      contact = 0; #2; contact = 1; #2;
    end
    contact = 0; #5;
  endtask

  task automatic mode_switch(input bit to_step);
    if (to_step) begin runmode_n = 1; #5 bounce(stepmode_n, 1); end
    else         begin stepmode_n = 1; #5 bounce(runmode_n, 1); end
  endtask

  task automatic press();
    hold_n = 1; #5 bounce(advance_n, 1);
  endtask

  task automatic release_sw();
    advance_n = 1; #5 bounce(hold_n, 1);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    as_n = 0; stepmode_n = 1; runmode_n = 0; advance_n = 1; hold_n = 0;
    #1 as_n = 1;
    #20;
    // RUN mode: RUN* stays low through bus cycles and step presses.
    for (int i = 0; i < 4; i++) begin
      as_n = 0; #20 check(run_n == 0, "run mode, in cycle");
      press(); check(run_n == 0, "run mode, pressed");
      release_sw();
      as_n = 1; #20 check(run_n == 0, "run mode, between cycles");
    end
    // Switch to STEP between cycles: no effect until AS* falls.
    mode_switch(1);
    check(step_mode == 1, "step_mode debounced");
    check(run_n == 0, "step takes effect only at next cycle");
    for (int i = 0; i < 6; i++) begin
      // A press between cycles does nothing.
      if (i == 2) begin press(); release_sw(); end
      as_n = 0; #20 check(run_n == 1, "step mode: cycle frozen");
      #200 check(run_n == 1, "step mode: still frozen");
      press();
      check(run_n == 0, "step pressed: cycle released");
      steps++;
      if (i == 3) begin
        // keep holding into the next cycle
        as_n = 1; #20;
        as_n = 0; #20 check(run_n == 1, "held switch does not run next cycle");
        release_sw();
        check(run_n == 1, "release does not step");
        press();
        check(run_n == 0, "new press steps");
        steps++;
      end
      release_sw();
      check(run_n == 0, "stays released until cycle ends");
      as_n = 1; #20 check(run_n == 1, "high again after cycle");
    end
    // Back to RUN in the middle of a frozen cycle: RUN* falls at once.
    as_n = 0; #20 check(run_n == 1, "frozen before switching to run");
    mode_switch(0);
    check(run_n == 0, "run mode acts at once");
    check(step_mode == 0, "step_mode cleared");
    as_n = 1; #20;
    check(steps == 7, "all steps made");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
