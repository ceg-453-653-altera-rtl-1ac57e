// tb_swim_watchdog: self-checking test of the SWIM bus-error watchdog.
// A 4 MHz clock drives an E clock of period 10 clocks (6 low, 4 high). Bus
// cycles of random length begin at random clock phases; BERR* must fall on
// exactly the fourth rising E edge after AS* falls (31 to 40 clocks), stay
// high for shorter cycles, return high when AS* rises, and never fall in
// STEP mode.
`timescale 1ns/1ps
module tb_swim_watchdog;
  logic clk = 0, e = 0, as_n = 0, step_mode = 0, berr_n;
  int checks = 0, failures = 0, ediv = 0, timeouts = 0;

  swim_watchdog dut (.*);

  always #125 clk = ~clk;
  always @(posedge clk) begin
    ediv <= (ediv == 9) ? 0 : ediv + 1;
    e    <= (ediv >= 5) && (ediv <= 8);   // 4 clocks high, 6 low
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 as_n = 1;  // rising AS* clears the timer
    repeat (20) @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      int len, e_edges, clocks, berr_at;
      step_mode = (n % 5 == 4);
      len = $urandom_range(4, 50);
      repeat ($urandom_range(1, 10)) @(posedge clk);
      @(negedge clk) as_n = 0;
      e_edges = 0; berr_at = -1; clocks = 0;
      for (int c = 0; c < len; c++) begin
        logic e_was;
        e_was = e;
        @(posedge clk); #1;
        clocks++;
        if (!e_was && e) e_edges++;
        if (berr_at < 0 && !berr_n) berr_at = clocks;
        check(berr_n == (step_mode || e_edges < 4), "berr follows E edge count");
      end
      if (berr_at > 0) begin
        timeouts++;
        check(berr_at >= 31 && berr_at <= 40, "berr in 31..40 clocks");
      end
      @(negedge clk) as_n = 1;
      #1 check(berr_n == 1, "berr released with AS*");
    end
    check(timeouts > 0, "some cycle timed out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
