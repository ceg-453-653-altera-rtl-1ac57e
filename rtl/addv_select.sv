// addv_select: combinational address decoder of the ADDV chip.
//
// Produces the memory chip selects of the MC68008 Lab 2 computer and the
// request terms the DTACK* and VPA*/VMA logic need. The SWIM chip pre-decodes
// the high address bits: addr_ok is 1 when A19, A18, A17 and A14 are all low,
// and fc is 1 in CPU-space (interrupt acknowledge) cycles, FC2..FC0 = 111.
// With A16 and A15 this splits the space into
//   RAM   $00000-$03FFF  (A16=0, A15=0)   read and write, strobed by DS*
//   ROM   $08000-$0BFFF  (A16=0, A15=1)   reads only, strobed by AS*
//   6800  $10000-$13FFF  (A16=1, A15=0)   ACIA/PIA via VPA*, VMA
// A0 selects the even (…0*) or odd (…1*) byte device. The ACIA responds to
// even addresses with A7=0, A6=1 and the PIA to odd addresses with A7=1,
// A6=0; all other address lines are ignored, so those devices repeat
// through the 6800 range.
//
// While boot_done is low (first eight bus cycles after reset) every data
// strobe enables the ROM of the addressed byte lane and the RAM is off, so
// the reset vectors at address 0 come from ROM.
//
// All outputs are combinational. The decode equations follow the handout's
// device-select equations; the grouping into this module, the DTACK* request
// terms (ram_ack, rom_sel) and the VPA* request (vpa_req) as outputs is this
// design's partition of the same logic.
module addv_select (
  input  logic boot_done, // from addv_boot_counter
  input  logic as_n,      // address strobe, active low
  input  logic ds_n,      // data strobe, active low
  input  logic rw_n,      // 1 = read, 0 = write
  input  logic fc,        // CPU-space cycle (from SWIM)
  input  logic addr_ok,   // A19/A18/A17/A14 all low (from SWIM)
  input  logic a16,
  input  logic a15,
  input  logic a7,
  input  logic a6,
  input  logic a0,
  output logic ramen0_n,  // RAM, even bytes
  output logic ramen1_n,  // RAM, odd bytes
  output logic romen0_n,  // ROM, even bytes
  output logic romen1_n,  // ROM, odd bytes
  output logic acia_sel,  // ACIA addressed (before VMA gating), active high
  output logic pia_sel,   // PIA addressed (before VMA gating), active high
  output logic ram_ack,   // RAM cycle that gets a zero-wait DTACK*
  output logic rom_sel,   // either ROM enable asserted
  output logic vpa_req    // 6800-range or interrupt-acknowledge cycle
);

  logic ram_area, rom_area, io_area, ram_cyc, rom_read, boot_rd;

  always_comb begin
    ram_area = addr_ok && !a16 && !a15;
    rom_area = addr_ok && !a16 &&  a15;
    io_area  = addr_ok &&  a16 && !a15;

    // RAM: any data strobe in the RAM area once booting is over.
    ram_cyc  = boot_done && !ds_n && !fc && ram_area;
    ramen0_n = !(ram_cyc && !a0);
    ramen1_n = !(ram_cyc &&  a0);

    // ROM: reads in the ROM area, or any data strobe while booting.
    rom_read = !as_n && !fc && rw_n && rom_area;
    boot_rd  = !boot_done && !ds_n;
    romen0_n = !((boot_rd || rom_read) && !a0);
    romen1_n = !((boot_rd || rom_read) &&  a0);
    rom_sel  = !romen0_n || !romen1_n;

    // RAM acknowledge: reads on DS*, writes already on AS* so the write is
    // acknowledged without waiting for the later write data strobe.
    ram_ack  = boot_done && ram_area && (!ds_n || (!as_n && !rw_n));

    // 6800-style peripherals.
    acia_sel = !ds_n && !fc && io_area && !a7 &&  a6 && !a0;
    pia_sel  = !ds_n && !fc && io_area &&  a7 && !a6 &&  a0;
    vpa_req  = !as_n && (io_area || fc);
  end

endmodule
