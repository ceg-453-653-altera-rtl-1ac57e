// glue_pkg: types and constants shared by the MC68008 glue-logic chips
// (ADDV address decoder / DTACK* / VPA*-VMA generator and SWIM single-step /
// watchdog / interrupt module).
//
// romws_e encodes the two ROMWS1:ROMWS0 strap inputs of ADDV. The four codes
// and their meaning (0, 2 or 4 ROM wait states, or DTACK* inhibited) follow
// the handout's wait-state table. A wait state is half a CPU clock, so the
// codes correspond to 1, 2 or 3 CPU clocks between ROM select and DTACK*.
// The address constants give the memory map the chips decode; they are used
// by the testbenches and documentation, the decoders use the address bits
// directly.
package glue_pkg;

  typedef enum logic [1:0] {
    ROMWS_0      = 2'b00,  // no ROM wait states
    ROMWS_2      = 2'b01,  // two ROM wait states
    ROMWS_4      = 2'b10,  // four ROM wait states
    ROMWS_INHIBIT = 2'b11  // DTACK* held inactive (single step)
  } romws_e;

  // Memory map decoded by the two chips (20-bit MC68008 address space).
  localparam logic [19:0] RAM_BASE  = 20'h00000;  // 16 KiB RAM
  localparam logic [19:0] RAM_LAST  = 20'h03FFF;
  localparam logic [19:0] ROM_BASE  = 20'h08000;  // 16 KiB ROM (TUTOR)
  localparam logic [19:0] ROM_LAST  = 20'h0BFFF;
  localparam logic [19:0] VPA_BASE  = 20'h10000;  // 6800-style peripheral range
  localparam logic [19:0] VPA_LAST  = 20'h13FFF;
  localparam logic [19:0] ACIA_BASE = 20'h10040;  // MC6850 ACIA, even bytes
  localparam logic [19:0] PIA_BASE  = 20'h10081;  // MC6821 PIA, odd bytes

  // Number of bus cycles, counted from RESET*, during which ROM is mapped
  // over the whole space so the reset vectors come from ROM.
  localparam int unsigned BOOT_CYCLES = 8;

endpackage
