// addv_boot_counter: bootstrap bus-cycle counter of the ADDV chip.
//
// After RESET* the MC68008 fetches its reset vectors from address 0, where
// the RAM normally lives. To let the vectors come from ROM, this counter
// keeps boot_done low for the first BOOT_CYCLES bus cycles after reset;
// the chip-select decoder then enables the ROM for every data strobe and
// keeps the RAM off. The counter is clocked by the rising edge of AS*, i.e.
// at the end of each bus cycle, and is cleared asynchronously while RESET*
// is low. On the end of the eighth bus cycle boot_done goes high and stays
// high until the next reset.
//
// Timing: boot_done rises at the rising AS* edge that ends bus cycle
// BOOT_CYCLES (8 in the handout). The handout's implementation is a
// three-flip-flop counter with a sticky top bit plus a sticky BOOT flag;
// here it is an ordinary saturating counter, which produces the same
// boot_done sequence. The counter width is derived from BOOT_CYCLES.
module addv_boot_counter #(
  parameter int unsigned BOOT_CYCLES = glue_pkg::BOOT_CYCLES
) (
  input  logic as_n,      // CPU address strobe, active low (used as clock)
  input  logic reset_n,   // system reset from the reset logic, active low
  output logic boot_done  // 1 once BOOT_CYCLES bus cycles have ended
);

  localparam int unsigned CW = (BOOT_CYCLES > 1) ? $clog2(BOOT_CYCLES) : 1;
  localparam logic [CW-1:0] LAST = CW'(BOOT_CYCLES - 1);

  logic [CW-1:0] cycles;

  always_ff @(posedge as_n or negedge reset_n) begin
    if (!reset_n) begin
      cycles    <= '0;
      boot_done <= 1'b0;
    end else if (!boot_done) begin
      if (cycles == LAST) boot_done <= 1'b1;
      else                cycles    <= cycles + 1'b1;
    end
  end

endmodule
