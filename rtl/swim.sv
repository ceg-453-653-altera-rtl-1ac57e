// swim: Single-step / Watchdog timer / Interrupt Module chip (SWIM).
//
// Companion of the ADDV chip in the MC68008 Lab 2 computer. It contains
//   swim_single_step  RUN/STEP switch and step switch -> RUN*
//   swim_watchdog     BERR* after AS* stays low for four rising E edges
//   swim_interrupt    abort switch, IRQ5*, IRQ2* -> IPL2/0*, IPL1*
//   swim_addr_decode  ADDR and FC predecode for the ADDV chip
// together with the debouncing latches of its three switches. The watchdog
// is disabled in STEP mode. Ports carry the chip's pin names, with
// *-suffixed pins written as _n.
//
// Clocks: clock (CPU clock) for the interrupt encoder, rising E for the
// watchdog, AS* edges and the debounced step switch for the single-step
// registers. AS* is both a clock/clear and a data input (lint tools flag
// the mix); that is how the original circuit times bus cycles.
module swim (
  input  logic a19,
  input  logic a18,
  input  logic a17,
  input  logic a14,
  input  logic clock,
  input  logic e,
  input  logic as_n,
  input  logic fc2,
  input  logic fc1,
  input  logic fc0,
  input  logic stepmode_n,
  input  logic runmode_n,
  input  logic advance_n,
  input  logic hold_n,
  input  logic abort_n,
  input  logic noabort_n,
  input  logic irq2_n,
  input  logic irq5_n,
  output logic run_n,
  output logic berr_n,
  output logic ipl20_n,
  output logic ipl1_n,
  output logic addr,
  output logic fc
);

  logic step_mode;

  swim_single_step u_step (
    .as_n, .stepmode_n, .runmode_n, .advance_n, .hold_n, .run_n, .step_mode
  );

  swim_watchdog u_wdog (
    .e, .as_n, .step_mode, .berr_n
  );

  swim_interrupt u_irq (
    .clk(clock), .irq2_n, .irq5_n, .abort_n, .noabort_n, .ipl20_n, .ipl1_n
  );

  swim_addr_decode u_dec (
    .a19, .a18, .a17, .a14, .fc2, .fc1, .fc0, .addr, .fc
  );

  // In STEP mode the watchdog must stay quiet.
  a_no_berr_in_step: assert property (@(posedge clock)
    step_mode |-> berr_n);

endmodule
