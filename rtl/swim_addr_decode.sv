// swim_addr_decode: high-order address and function-code predecoder on
// the SWIM chip.
//
// The ADDV chip has too few pins for the whole address bus, so the SWIM
// decodes the bits ADDV does not see and passes two signals across:
//   addr = 1 when A19, A18, A17 and A14 are all 0 (the address lies in one
//          of the decoded 16 KiB windows $00000, $08000, $10000)
//   fc   = 1 when FC2..FC0 = 111 (CPU space: interrupt acknowledge)
// Purely combinational, as in the handout.
module swim_addr_decode (
  input  logic a19,
  input  logic a18,
  input  logic a17,
  input  logic a14,
  input  logic fc2,
  input  logic fc1,
  input  logic fc0,
  output logic addr,
  output logic fc
);

  assign addr = !(a19 || a18 || a17 || a14);
  assign fc   = fc2 && fc1 && fc0;

endmodule
