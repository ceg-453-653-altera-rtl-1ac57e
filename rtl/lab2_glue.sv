// lab2_glue: complete glue logic of the MC68008 Lab 2 computer, i.e. the
// SWIM and ADDV chips wired together as a pair.
//
// Everything between the CPU and its memories and peripherals that is not a
// bus buffer or the reset circuit: chip selects, DTACK* with ROM wait states,
// VPA*/VMA for the 6800-family ACIA and PIA, the bus-error watchdog, the
// single-step facility and the interrupt priority encoder. Wiring inside:
//   SWIM addr, fc  -> ADDV addr, fc      (high address bits predecoded)
//   SWIM run_n     -> ADDV romws1/romws0 (single step inhibits DTACK*)
// The ROMWS strap wiring sets the ROM wait states, as the chips' wiring
// instructions give it:
//   ROM_WAIT_STATES = 0: ROMWS1 = RUN*, ROMWS0 = RUN*
//   ROM_WAIT_STATES = 2: ROMWS1 = RUN*, ROMWS0 = 1
//   ROM_WAIT_STATES = 4: ROMWS1 = 1,    ROMWS0 = RUN*
// In each case RUN* high gives code 11, DTACK* inhibited. The default of 0
// wait states is this design's choice.
//
// The ports are the CPU bus (a, fc, as_n, ds_n, rw_n, clock, e), the reset
// from the external reset circuit, the switch contacts and interrupt
// requests, and the outputs to the CPU and to the memory and I/O devices.
// Timing is that of the two chips; see addv and swim.
module lab2_glue #(
  parameter int unsigned ROM_WAIT_STATES = 0
) (
  input  logic        clock,      // 4 MHz CPU clock
  input  logic        e,          // CPU E clock
  input  logic        reset_n,    // from the reset circuit
  input  logic [19:0] a,          // CPU address bus
  input  logic [2:0]  fcode,      // CPU function code FC2..FC0
  input  logic        as_n,
  input  logic        ds_n,
  input  logic        rw_n,
  input  logic        stepmode_n, // RUN/STEP switch contacts
  input  logic        runmode_n,
  input  logic        advance_n,  // single-step switch contacts
  input  logic        hold_n,
  input  logic        abort_n,    // abort switch contacts
  input  logic        noabort_n,
  input  logic        irq2_n,     // interrupt requests
  input  logic        irq5_n,
  output logic        ramen0_n,   // memory and peripheral enables
  output logic        ramen1_n,
  output logic        romen0_n,
  output logic        romen1_n,
  output logic        aciaen_n,
  output logic        piaen_n,
  output logic        dtack_n,    // to the CPU
  output logic        vpa_n,
  output logic        berr_n,
  output logic        ipl20_n,
  output logic        ipl1_n,
  output logic        run_n       // single-step state, for a lamp
);

  logic addr, fc, romws1, romws0;

  if (ROM_WAIT_STATES == 0) begin : g_ws0
    assign romws1 = run_n;
    assign romws0 = run_n;
  end else if (ROM_WAIT_STATES == 2) begin : g_ws2
    assign romws1 = run_n;
    assign romws0 = 1'b1;
  end else if (ROM_WAIT_STATES == 4) begin : g_ws4
    assign romws1 = 1'b1;
    assign romws0 = run_n;
  end else begin : g_bad
    $error("lab2_glue: ROM_WAIT_STATES must be 0, 2 or 4");
  end

  swim u_swim (
    .a19(a[19]), .a18(a[18]), .a17(a[17]), .a14(a[14]),
    .clock, .e, .as_n,
    .fc2(fcode[2]), .fc1(fcode[1]), .fc0(fcode[0]),
    .stepmode_n, .runmode_n, .advance_n, .hold_n,
    .abort_n, .noabort_n, .irq2_n, .irq5_n,
    .run_n, .berr_n, .ipl20_n, .ipl1_n, .addr, .fc
  );

  addv u_addv (
    .a16(a[16]), .a15(a[15]), .a7(a[7]), .a6(a[6]), .a0(a[0]),
    .clock, .as_n, .ds_n, .rw_n, .reset_n, .fc, .addr,
    .romws1, .romws0, .e,
    .ramen0_n, .ramen1_n, .romen0_n, .romen1_n,
    .aciaen_n, .piaen_n, .vpa_n, .dtack_n
  );

endmodule
