// addv: Address decoder / DTACK* generator / VPA*-VMA generator chip (ADDV).
//
// Glue chip of an MC68008 computer that is code-compatible with the
// MEX68KECB educational board: 16 KiB RAM at $0000, 16 KiB TUTOR ROM at
// $8000 (each as an even- and an odd-byte 8-bit device), an MC6850 ACIA and
// an MC6821 PIA in the 6800-peripheral range at $10000. It is built from
//   addv_boot_counter  maps ROM over address 0 for 8 bus cycles after reset
//   addv_select        chip selects and the DTACK*/VPA* request terms
//   addv_dtack_gen     zero-wait RAM DTACK*, 0/2/4-wait ROM DTACK*, inhibit
//   addv_vpa_vma       VPA* for the peripheral range and interrupt
//                      acknowledge, VMA-gated ACIA and PIA enables
// The high address bits arrive pre-decoded from the SWIM chip (addr_ok, fc).
// Ports carry the chip's pin names, with *-suffixed pins written as _n.
// The handout's pin 3 is an internal feedback pin with no logic function of
// its own and is not a port here.
//
// Clocks: clock (CPU clock) for the wait-state and VMA registers, the
// falling edge of E for VPA, the rising edge of AS* for the boot counter.
// AS* high and RESET* low clear registers asynchronously. AS* is therefore
// used both as a clock/clear and as a decode input; lint tools flag that
// mix, and it is the intended structure of this strobe-driven circuit.
module addv (
  input  logic a16,
  input  logic a15,
  input  logic a7,
  input  logic a6,
  input  logic a0,
  input  logic clock,
  input  logic as_n,
  input  logic ds_n,
  input  logic rw_n,
  input  logic reset_n,
  input  logic fc,
  input  logic addr,
  input  logic romws1,
  input  logic romws0,
  input  logic e,
  output logic ramen0_n,
  output logic ramen1_n,
  output logic romen0_n,
  output logic romen1_n,
  output logic aciaen_n,
  output logic piaen_n,
  output logic vpa_n,
  output logic dtack_n
);

  logic boot_done, acia_sel, pia_sel, ram_ack, rom_sel, vpa_req;
  glue_pkg::romws_e romws;

  assign romws = glue_pkg::romws_e'({romws1, romws0});

  addv_boot_counter u_boot (
    .as_n, .reset_n, .boot_done
  );

  addv_select u_select (
    .boot_done, .as_n, .ds_n, .rw_n, .fc, .addr_ok(addr),
    .a16, .a15, .a7, .a6, .a0,
    .ramen0_n, .ramen1_n, .romen0_n, .romen1_n,
    .acia_sel, .pia_sel, .ram_ack, .rom_sel, .vpa_req
  );

  addv_dtack_gen u_dtack (
    .clk(clock), .rom_sel, .ram_ack, .romws, .dtack_n
  );

  addv_vpa_vma u_vpa (
    .clk(clock), .e, .as_n, .vpa_req, .acia_sel, .pia_sel,
    .vpa_n, .aciaen_n, .piaen_n
  );

  // At most one memory device of each kind, and never RAM and ROM together.
  a_ram_rom_exclusive: assert property (@(posedge clock)
    !((!ramen0_n || !ramen1_n) && (!romen0_n || !romen1_n)));
  a_acia_pia_exclusive: assert property (@(posedge clock)
    !(!aciaen_n && !piaen_n));
  // A peripheral enable is only given inside a VPA* cycle.
  a_enable_needs_vpa: assert property (@(posedge clock)
    (!aciaen_n || !piaen_n) |-> !vpa_n);

endmodule
