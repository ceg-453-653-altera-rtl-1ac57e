// tb_swim_interrupt: self-checking test of the SWIM interrupt encoder.
// Drives random IRQ2*/IRQ5* levels and presses/releases the abort switch
// (with its break-before-make contacts) and checks the IPL outputs against
// the priority table with the two-rising-edge latency: the outputs after
// clock edge n must encode the inputs that were stable before edge n-1.
`timescale 1ns/1ps
module tb_swim_interrupt;
  logic clk = 0, irq2_n, irq5_n, abort_n, noabort_n, ipl20_n, ipl1_n;
  int checks = 0, failures = 0;
  int seen_level[8];

  swim_interrupt dut (.*);

  always #125 clk = ~clk;   // 4 MHz

  // Expected {ipl20_n, ipl1_n} from the priority table.
  function automatic logic [1:0] encode(input logic i2_n, input logic i5_n,
                                        input logic pressed);
    if (pressed)     return 2'b00;  // level 7
    else if (!i5_n)  return 2'b01;  // level 5
    else if (!i2_n)  return 2'b10;  // level 2
    else             return 2'b11;  // none
  endfunction

  logic [1:0] hist [0:2];  // expected code of inputs before the last 3 edges
  logic pressed;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    irq2_n = 1; irq5_n = 1; abort_n = 1; noabort_n = 0; pressed = 0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      // change inputs away from the clock edge
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) irq2_n = $urandom_range(0, 1);
      if ($urandom_range(0, 3) == 0) irq5_n = $urandom_range(0, 1);
      if ($urandom_range(0, 15) == 0) begin
        pressed = !pressed;
        abort_n = 1; noabort_n = 1;     // contacts in transit
        if (pressed) abort_n = 0; else noabort_n = 0;
      end
      hist[2] = hist[1];
      hist[1] = hist[0];
      hist[0] = encode(irq2_n, irq5_n, pressed);
      @(posedge clk); #1;
      // Output after this edge reflects inputs set two edges ago.
      if (i >= 2) begin
        checks++;
        if ({ipl20_n, ipl1_n} !== hist[1]) begin
          failures++;
          $display("FAIL at %0t: ipl=%02b expected %02b", $time,
                   {ipl20_n, ipl1_n}, hist[1]);
        end
        seen_level[{~ipl20_n, ~ipl1_n, ~ipl20_n}]++;
      end
    end
    // Latency check: a new request appears at the second edge, not the first.
    @(negedge clk); irq2_n = 1; irq5_n = 1; abort_n = 1; noabort_n = 0;
    pressed = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); irq5_n = 0;
    @(posedge clk); #1;
    checks++; if ({ipl20_n, ipl1_n} !== 2'b11) begin failures++; $display("FAIL early"); end
    @(posedge clk); #1;
    checks++; if ({ipl20_n, ipl1_n} !== 2'b01) begin failures++; $display("FAIL late"); end
    foreach (seen_level[l])
      if (l == 0 || l == 2 || l == 5 || l == 7) begin
        checks++;
        if (seen_level[l] == 0) begin failures++; $display("FAIL level %0d never seen", l); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
