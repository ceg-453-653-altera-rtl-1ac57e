// tb_addv_dtack_gen: self-checking test of the DTACK* generator.
// For each ROMWS code it selects the ROM and counts rising clock edges
// until DTACK* falls: 1, 2 and 3 edges for 0, 2 and 4 wait states, never
// for the inhibit code. It checks that DTACK* releases as soon as the ROM
// select goes away, that a RAM acknowledge is immediate for the three
// enabled codes and blocked by the inhibit code.
`timescale 1ns/1ps
module tb_addv_dtack_gen;
  import glue_pkg::*;
  logic clk = 0, rom_sel = 1, ram_ack = 0, dtack_n;
  romws_e romws;
  int checks = 0, failures = 0;

  addv_dtack_gen dut (.*);

  always #125 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int exp_edges(input romws_e c);
    case (c)
      ROMWS_0: return 1;
      ROMWS_2: return 2;
      ROMWS_4: return 3;
      default: return -1;
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    romws = ROMWS_0;
    #1 rom_sel = 0;  // falling select clears the wait-state register
    repeat (2) @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      int edges;
      romws = romws_e'($urandom_range(0, 3));
      @(negedge clk);
      if (n % 2 == 0) begin
        // ROM cycle
        rom_sel = 1; #1;
        check(dtack_n == 1, "no DTACK* before first edge");
        edges = 0;
        while (dtack_n && edges < 8) begin
          @(posedge clk); #1; edges++;
        end
        if (exp_edges(romws) < 0) check(dtack_n == 1, "inhibited ROM DTACK*");
        else check(edges == exp_edges(romws) && !dtack_n, "ROM wait states");
        repeat ($urandom_range(0, 3)) begin
          @(posedge clk); #1;
          check(dtack_n == (romws == ROMWS_INHIBIT), "DTACK* held");
        end
        @(negedge clk) rom_sel = 0; #1;
        check(dtack_n == 1, "DTACK* released with ROM select");
      end else begin
        ram_ack = 1; #1;
        check(dtack_n == (romws == ROMWS_INHIBIT), "RAM DTACK* immediate");
        @(posedge clk); #1;
        check(dtack_n == (romws == ROMWS_INHIBIT), "RAM DTACK* held");
        ram_ack = 0; #1;
        check(dtack_n == 1, "RAM DTACK* released");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
