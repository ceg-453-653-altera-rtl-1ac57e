// addv_vpa_vma: VPA* and VMA generator of the ADDV chip.
//
// The ACIA (MC6850) and PIA (MC6821) are 6800-family parts that transfer
// data in step with the E clock. For a bus cycle in $10000-$13FFF, or any
// interrupt acknowledge (which makes every interrupt auto-vectored), the
// VPA flip-flop is set on the next falling (trailing) edge of E and VPA* is
// asserted; the MC68008 then runs a synchronous 6800-style cycle. When VPA
// is set and the ACIA or PIA is addressed, the VMA flip-flop is set on the
// next rising CPU clock edge and releases the device's enable (ACIAEN* or
// PIAEN*). Both flip-flops are cleared asynchronously while AS* is high, so
// all three outputs return inactive at the end of the bus cycle.
//
// Timing: VPA* falls at the first falling E edge with vpa_req high; the
// enables fall one rising clk edge after VPA*. This follows the handout's
// VPA*/VMA generator (a JK flip-flop with K tied low on E, and a D
// flip-flop on the CPU clock).
module addv_vpa_vma (
  input  logic clk,       // 4 MHz CPU clock
  input  logic e,         // CPU E clock (clock/10)
  input  logic as_n,      // address strobe, active low
  input  logic vpa_req,   // from the decoder
  input  logic acia_sel,  // ACIA addressed (from the decoder)
  input  logic pia_sel,   // PIA addressed (from the decoder)
  output logic vpa_n,     // to the CPU VPA* input
  output logic aciaen_n,  // ACIA enable, active low
  output logic piaen_n    // PIA enable, active low
);

  logic vpa, vma;

  always_ff @(negedge e or posedge as_n) begin
    if (as_n)         vpa <= 1'b0;
    else if (vpa_req) vpa <= 1'b1;
  end

  always_ff @(posedge clk or posedge as_n) begin
    if (as_n) vma <= 1'b0;
    else      vma <= vpa && (acia_sel || pia_sel);
  end

  assign vpa_n    = !vpa;
  assign aciaen_n = !(acia_sel && vma);
  assign piaen_n  = !(pia_sel && vma);

endmodule
