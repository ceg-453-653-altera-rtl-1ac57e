// tb_addv_select: exhaustive test of the ADDV chip-select decoder.
// Every combination of its 11 inputs is applied. The expected values come
// from the memory map: the address bits are assembled into a 20-bit address
// that is compared with the RAM, ROM, ACIA and PIA ranges, and the bus
// cycle type (read or write, AS* and DS* state, CPU space, boot phase)
// decides which device may respond.
`timescale 1ns/1ps
module tb_addv_select;
  import glue_pkg::*;
  logic boot_done, as_n, ds_n, rw_n, fc, addr_ok, a16, a15, a7, a6, a0;
  logic ramen0_n, ramen1_n, romen0_n, romen1_n, acia_sel, pia_sel;
  logic ram_ack, rom_sel, vpa_req;
  int checks = 0, failures = 0;

  addv_select dut (.*);

  task automatic expect_eq(input logic got, input logic exp, input string what,
                           input logic [10:0] v);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s inputs=%011b got %0b", what, v, got);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2048; v++) begin
      logic [19:0] adr;
      bit in_ram, in_rom, in_io, is_acia, is_pia, odd, ds, as, rd, boot;
      {boot_done, as_n, ds_n, rw_n, fc, addr_ok, a16, a15, a7, a6, a0} = 11'(v);
      #1;
      // A representative address: addr_ok=0 stands for A19 set.
      adr = '0;
      adr[19] = !addr_ok; adr[16] = a16; adr[15] = a15;
      adr[7] = a7; adr[6] = a6; adr[0] = a0;
      in_ram = adr >= RAM_BASE && adr <= RAM_LAST;
      in_rom = adr >= ROM_BASE && adr <= ROM_LAST;
      in_io  = adr >= VPA_BASE && adr <= VPA_LAST;
      // ACIA: even, A7..A6 = 01 within the 6800 range (aliases repeat).
      is_acia = in_io && !a0 && (adr[7:6] == ACIA_BASE[7:6]);
      is_pia  = in_io &&  a0 && (adr[7:6] == PIA_BASE[7:6]);
      odd = a0; ds = !ds_n; as = !as_n; rd = rw_n; boot = !boot_done;
      expect_eq(ramen0_n, !(!boot && ds && !fc && in_ram && !odd), "RAMEN0*", 11'(v));
      expect_eq(ramen1_n, !(!boot && ds && !fc && in_ram &&  odd), "RAMEN1*", 11'(v));
      expect_eq(romen0_n, !(!odd && ((boot && ds) || (as && rd && !fc && in_rom))), "ROMEN0*", 11'(v));
      expect_eq(romen1_n, !( odd && ((boot && ds) || (as && rd && !fc && in_rom))), "ROMEN1*", 11'(v));
      expect_eq(rom_sel, !romen0_n || !romen1_n, "rom_sel", 11'(v));
      expect_eq(ram_ack, !boot && in_ram && (ds || (as && !rd)), "ram_ack", 11'(v));
      expect_eq(acia_sel, ds && !fc && is_acia, "acia_sel", 11'(v));
      expect_eq(pia_sel, ds && !fc && is_pia, "pia_sel", 11'(v));
      expect_eq(vpa_req, as && (in_io || fc), "vpa_req", 11'(v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
