// addv_dtack_gen: DTACK* generator of the ADDV chip.
//
// RAM cycles are acknowledged at once (ram_ack from the decoder drives
// DTACK* combinationally). ROM cycles are acknowledged after a programmable
// delay: a three-stage shift register, held clear while no ROM enable is
// asserted, shifts in a 1 on every rising CPU clock edge once a ROM is
// selected. The ROMWS1:ROMWS0 straps pick which stage acknowledges:
//   00 -> first stage  (0 wait states)   01 -> second stage (2 wait states)
//   10 -> third stage  (4 wait states)   11 -> DTACK* inhibited
// Code 11 blocks the RAM acknowledge too; it is how the single-step switch
// (RUN* of the SWIM chip) holds the processor in the middle of a bus cycle.
//
// Timing: for ROM, DTACK* falls 1, 2 or 3 rising clock edges after the ROM
// enable, and rises as soon as the ROM enable is released (asynchronous
// clear). For RAM, DTACK* follows ram_ack with no clock delay. The
// structure follows the handout's wait-state generator; the parameter form
// of the stage count is this design's.
module addv_dtack_gen (
  input  logic            clk,      // 4 MHz CPU clock
  input  logic            rom_sel,  // a ROM enable is asserted
  input  logic            ram_ack,  // RAM cycle wanting DTACK*
  input  glue_pkg::romws_e romws,   // ROMWS1:ROMWS0 straps
  output logic            dtack_n   // data transfer acknowledge, active low
);
  import glue_pkg::*;

  logic [2:0] ws;  // ws[i] = 1 after i+1 rising clock edges of a ROM cycle

  always_ff @(posedge clk or negedge rom_sel) begin
    if (!rom_sel) ws <= '0;
    else          ws <= {ws[1:0], 1'b1};
  end

  always_comb begin
    unique case (romws)
      ROMWS_0:       dtack_n = !(ram_ack || ws[0]);
      ROMWS_2:       dtack_n = !(ram_ack || ws[1]);
      ROMWS_4:       dtack_n = !(ram_ack || ws[2]);
      ROMWS_INHIBIT: dtack_n = 1'b1;
      default:       dtack_n = 1'b1;
    endcase
  end

endmodule
