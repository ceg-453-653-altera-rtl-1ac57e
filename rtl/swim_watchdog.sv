// swim_watchdog: bus-error watchdog timer of the SWIM chip.
//
// A bus cycle that nobody acknowledges would hang the MC68008 forever. This
// timer counts rising edges of the E clock (CPU clock / 10) while AS* is
// low: a shift register shifts in a 1 on each rising E edge and is cleared
// asynchronously while AS* is high or the RUN/STEP switch is in STEP
// position (a single-stepped cycle may legitimately last any time). When
// the last stage is set, BERR* is asserted and the CPU takes the bus-error
// trap; BERR* returns high when AS* rises.
//
// Timing: BERR* falls on the E_EDGES-th rising edge of E after AS* falls,
// which with a 10-clock E period is 31 to 40 CPU clocks into the cycle.
// E_EDGES = 4 is the handout's figure; making it a parameter is this
// design's choice.
module swim_watchdog #(
  parameter int unsigned E_EDGES = 4
) (
  input  logic e,          // CPU E clock
  input  logic as_n,       // address strobe, active low
  input  logic step_mode,  // debounced RUN/STEP switch in STEP position
  output logic berr_n      // bus error to the CPU, active low
);

  logic             wclr;
  logic [E_EDGES-1:0] qt;

  assign wclr = as_n || step_mode;

  always_ff @(posedge e or posedge wclr) begin
    if (wclr) qt <= '0;
    else      qt <= {qt[E_EDGES-2:0], !as_n};
  end

  assign berr_n = !qt[E_EDGES-1];

endmodule
