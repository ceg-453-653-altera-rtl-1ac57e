// swim_single_step: RUN/STEP control of the SWIM chip.
//
// Two debounced switches drive it: the RUN/STEP switch (runmode_n /
// stepmode_n) and the spring-loaded single-step switch (hold_n at rest,
// advance_n when pressed). RUN* is fed to the ADDV chip's ROMWS straps,
// where RUN* high inhibits DTACK* and so freezes the processor inside the
// current bus cycle.
//   RUN mode:  RUN* is always low.
//   STEP mode: RUN* is high from the start of each bus cycle; pressing the
//              step switch during the cycle pulls RUN* low, which lets that
//              one cycle complete. Holding the switch down does not run
//              more cycles: a new press is needed for each cycle.
// A change of the mode switch into STEP takes effect at the start (falling
// AS*) of the next bus cycle; a change into RUN takes effect at once.
//
// Registers: step_mode_q is set on the falling edge of AS* in STEP mode and
// cleared asynchronously in RUN mode; step_go is set by the rising edge of
// the debounced "step pressed in STEP mode" signal and cleared while AS* is
// high. RUN* = step_mode_q AND NOT step_go. step_mode is the debounced
// switch position, used by the watchdog. The structure follows the
// handout's single-step circuit; clocking a register from a debounced
// switch is inherent to it.
module swim_single_step (
  input  logic as_n,        // CPU address strobe, active low
  input  logic stepmode_n,  // RUN/STEP switch in STEP position, active low
  input  logic runmode_n,   // RUN/STEP switch in RUN position, active low
  input  logic advance_n,   // step switch pressed, active low
  input  logic hold_n,      // step switch at rest, active low
  output logic run_n,       // RUN*, to the ADDV ROMWS straps
  output logic step_mode    // debounced: switch is in STEP position
);

  logic run_mode, pressed, step_pulse, step_mode_q, step_go;

  switch_latch u_mode (.set_n(stepmode_n), .clr_n(runmode_n),
                       .q(step_mode), .q_n(run_mode));
  switch_latch u_step (.set_n(advance_n), .clr_n(hold_n),
                       .q(pressed), .q_n());

  assign step_pulse = pressed && step_mode;

  always_ff @(negedge as_n or posedge run_mode) begin
    if (run_mode) step_mode_q <= 1'b0;
    else          step_mode_q <= step_mode;
  end

  always_ff @(posedge step_pulse or posedge as_n) begin
    if (as_n) step_go <= 1'b0;
    else      step_go <= 1'b1;
  end

  assign run_n = step_mode_q && !step_go;

endmodule
