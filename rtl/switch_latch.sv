// switch_latch: set/reset latch that debounces a single-pole double-throw
// switch.
//
// The switch grounds set_n in one position and clr_n in the other; both
// inputs are pulled up. A contact bounce only reopens the contact the
// switch is resting on, which leaves the latch holding, so q changes once
// per throw. q is set while set_n is low (set wins if both were ever low),
// cleared while clr_n is low, and held while both are high. q_n is the
// complement.
//
// The handout builds each debouncer from two cross-coupled NAND gates; here
// the same behaviour is written as a level-sensitive latch, which is why
// tools report a latch for this module: holding state without a clock is
// the purpose of the circuit. There is no reset: the first throw of the
// switch (or its resting position at power-up) sets the state.
module switch_latch (
  input  logic set_n,  // contact that sets q, active low
  input  logic clr_n,  // contact that clears q, active low
  output logic q,
  output logic q_n
);

  always_latch begin
    if (!set_n)      q = 1'b1;
    else if (!clr_n) q = 1'b0;
  end

  assign q_n = !q;

endmodule
