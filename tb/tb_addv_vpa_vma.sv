// tb_addv_vpa_vma: self-checking test of the VPA*/VMA generator.
// A 4 MHz clock drives an E clock of period 10 clocks. Bus cycles start at
// random clock phases with a random mix of VPA request, ACIA and PIA
// selection. Checks: VPA* falls at the first falling E edge after the
// request and not before; the addressed enable falls exactly one rising
// clock edge after VPA*, and never without VPA*; everything returns
// inactive as soon as AS* rises.
`timescale 1ns/1ps
module tb_addv_vpa_vma;
  logic clk = 0, e = 0, as_n = 0, vpa_req = 0, acia_sel = 0, pia_sel = 0;
  logic vpa_n, aciaen_n, piaen_n;
  int checks = 0, failures = 0, ediv = 0, n_acia = 0, n_pia = 0;

  addv_vpa_vma dut (.*);

  always #125 clk = ~clk;
  always @(posedge clk) begin
    ediv <= (ediv == 9) ? 0 : ediv + 1;
    e    <= (ediv >= 5) && (ediv <= 8);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 as_n = 1;  // rising AS* clears the flip-flops
    repeat (12) @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      bit req, sa, sp;
      int clocks, vpa_clock, en_clock;
      bit e_fell;
      req = $urandom_range(0, 3) != 0;
      sa = req && $urandom_range(0, 2) == 0;
      sp = req && !sa && $urandom_range(0, 1) == 0;
      repeat ($urandom_range(0, 9)) @(posedge clk);
      @(negedge clk);
      as_n = 0; vpa_req = req; acia_sel = sa; pia_sel = sp;
      #1 check(vpa_n && aciaen_n && piaen_n, "nothing at cycle start");
      e_fell = 0; vpa_clock = -1; en_clock = -1;
      for (clocks = 1; clocks <= 25; clocks++) begin
        logic e_was, vpa_was;
        e_was = e; vpa_was = !vpa_n;
        @(posedge clk); #1;
        if (e_was && !e) e_fell = 1;
        // VPA* may only change on a falling E edge
        check(!vpa_n == (req && e_fell), "VPA* at trailing E edge");
        if (!vpa_n && vpa_clock < 0) vpa_clock = clocks;
        if ((!aciaen_n || !piaen_n) && en_clock < 0) en_clock = clocks;
        check(aciaen_n == !(sa && vpa_was), "ACIAEN* one clock after VPA*");
        check(piaen_n == !(sp && vpa_was), "PIAEN* one clock after VPA*");
      end
      if (sa || sp) check(en_clock == vpa_clock + 1, "enable latency");
      if (sa && !aciaen_n) n_acia++;
      if (sp && !piaen_n) n_pia++;
      @(negedge clk) as_n = 1; #1;
      check(vpa_n && aciaen_n && piaen_n, "released with AS*");
      vpa_req = 0; acia_sel = 0; pia_sel = 0;
    end
    check(n_acia > 0 && n_pia > 0, "both devices enabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
