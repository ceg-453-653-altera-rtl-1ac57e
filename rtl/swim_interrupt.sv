// swim_interrupt: interrupt priority encoder of the SWIM chip.
//
// Three interrupt sources share the MC68008's two priority inputs
// (IPL2* and IPL0* are tied together on the 48-pin part, giving levels
// 0, 2, 5 and 7):
//   abort switch pressed        -> level 7 (ipl20_n=0, ipl1_n=0)
//   IRQ5* low                   -> level 5 (ipl20_n=0, ipl1_n=1)
//   IRQ2* low                   -> level 2 (ipl20_n=1, ipl1_n=0)
//   none                        -> level 0 (ipl20_n=1, ipl1_n=1)
// The highest requesting level wins. The abort switch is debounced by a
// set/reset latch (abort_n / noabort_n contacts). The three requests are
// sampled into flip-flops on the rising CPU clock edge, encoded, and the
// encoded outputs are registered again, so a change of the inputs shows on
// the outputs at the second rising clock edge after it. This matches the
// handout's encoder and its stated two-edge latency.
module swim_interrupt (
  input  logic clk,        // 4 MHz CPU clock
  input  logic irq2_n,     // level-2 request, active low
  input  logic irq5_n,     // level-5 request, active low
  input  logic abort_n,    // abort switch pressed, active low
  input  logic noabort_n,  // abort switch at rest, active low
  output logic ipl20_n,    // to IPL2* and IPL0* of the CPU
  output logic ipl1_n      // to IPL1* of the CPU
);

  logic abort_sw;
  logic q2_n, q5_n, qabt;

  switch_latch u_abort (.set_n(abort_n), .clr_n(noabort_n),
                        .q(abort_sw), .q_n());

  always_ff @(posedge clk) begin
    q2_n <= irq2_n;
    q5_n <= irq5_n;
    qabt <= abort_sw;
    ipl20_n <= q5_n && !qabt;
    ipl1_n  <= !qabt && !(!q2_n && q5_n);
  end

endmodule
