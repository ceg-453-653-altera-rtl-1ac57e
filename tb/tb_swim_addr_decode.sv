// tb_swim_addr_decode: exhaustive test of the SWIM's ADDR/FC predecoder.
// For every combination of A19, A18, A17, A14 and FC2..FC0 it builds the
// 20-bit address those bits stand for and checks addr against the three
// 16 KiB windows of the memory map, and fc against the CPU-space code 7.
`timescale 1ns/1ps
module tb_swim_addr_decode;
  import glue_pkg::*;
  logic a19, a18, a17, a14, fc2, fc1, fc0, addr, fc;
  int checks = 0, failures = 0;

  swim_addr_decode dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      logic [19:0] adr;
      logic exp_addr;
      {a19, a18, a17, a14, fc2, fc1, fc0} = 7'(v);
      // Address with the other bits chosen to land in a window if possible.
      for (int w = 0; w < 3; w++) begin
        adr = (w == 0) ? RAM_BASE : (w == 1) ? ROM_BASE : VPA_BASE;
        adr[19] = a19; adr[18] = a18; adr[17] = a17; adr[14] = a14;
        exp_addr = ((adr >= RAM_BASE) && (adr <= RAM_LAST)) ||
                   ((adr >= ROM_BASE) && (adr <= ROM_LAST)) ||
                   ((adr >= VPA_BASE) && (adr <= VPA_LAST));
        #1;
        checks++;
        if (addr !== exp_addr) begin
          failures++;
          $display("FAIL addr for %05h: got %0b", adr, addr);
        end
      end
      checks++;
      if (fc !== ({fc2, fc1, fc0} == 3'd7)) begin
        failures++;
        $display("FAIL fc for %03b: got %0b", {fc2, fc1, fc0}, fc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
