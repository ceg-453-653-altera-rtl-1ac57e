// tb_addv_boot_counter: self-checking test of the bootstrap counter.
// After each RESET* it runs bus cycles (AS* pulses) and checks that
// boot_done stays low for exactly eight cycles and rises with the rising
// AS* edge that ends the eighth, then stays high. Resets are applied at
// random points, including inside the boot phase.
`timescale 1ns/1ps
module tb_addv_boot_counter;
  logic as_n, reset_n, boot_done;
  int checks = 0, failures = 0;

  addv_boot_counter dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic bus_cycle();
    as_n = 0; #50; as_n = 1; #50;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    as_n = 1; reset_n = 1;
    for (int r = 0; r < 30; r++) begin
      int ncyc;
      reset_n = 0;
      // AS* activity during reset must not count
      bus_cycle();
      check(boot_done == 0, "cleared by reset");
      reset_n = 1; #20;
      ncyc = (r % 3 == 0) ? $urandom_range(0, 7) : $urandom_range(8, 20);
      for (int c = 1; c <= ncyc; c++) begin
        as_n = 0; #50;
        check(boot_done == (c > 8), "value during cycle");
        as_n = 1; #1;
        check(boot_done == (c >= 8), "value after cycle end");
        #49;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
