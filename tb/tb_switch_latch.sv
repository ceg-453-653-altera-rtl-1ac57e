// tb_switch_latch: self-checking test of the SPDT debounce latch.
// Throws the switch both ways, with contact bounce (the resting contact
// opening and closing several times) and checks that q changes exactly once
// per throw and holds through the bounces and the break-before-make gap.
`timescale 1ns/1ps
module tb_switch_latch;
  logic set_n, clr_n, q, q_n;
  int checks = 0, failures = 0;

  switch_latch dut (.set_n, .clr_n, .q, .q_n);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // Move from one contact to the other: open the old one, travel, then
  // bounce on the new one. exp is the latch value after the throw.
  task automatic throw_to(input bit to_set);
    logic prev;
    prev = q;
    if (to_set) clr_n = 1; else set_n = 1;
    #10 check(q, prev, "holds during travel");
    for (int b = 0; b < 4; b++) begin
      if (to_set) set_n = 0; else clr_n = 0;
      #3 check(q, to_set, "follows new contact");
      if (to_set) set_n = 1; else clr_n = 1;
      #3 check(q, to_set, "holds through bounce");
    end
    if (to_set) set_n = 0; else clr_n = 0;
    #10 check(q, to_set, "settled");
    check(q_n, !to_set, "complement");
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set_n = 1; clr_n = 0;   // resting in the clear position
    #10 check(q, 0, "power-up in clear position");
    for (int i = 0; i < 20; i++) throw_to(i % 2 == 0);
    // Both contacts momentarily closed: set wins.
    set_n = 0; clr_n = 0;
    #5 check(q, 1, "set dominates");
    set_n = 1;
    #5 check(q, 0, "clear after set released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
