// tb_swim: self-checking test of the SWIM chip with a bus-cycle model of
// the MC68008. The memory side is reduced to one rule, standing in for the
// ADDV chip: a cycle is acknowledged at once when the SWIM's ADDR output
// says the address is decoded and RUN* is low. It checks
//   - ADDR and FC predecode for every bus cycle
//   - RUN mode: decoded cycles complete; undecoded ones end with BERR*
//     31 to 40 clocks after AS* falls
//   - STEP mode: cycles are frozen (RUN* high, no BERR*) until the step
//     switch is pressed; one cycle per press
//   - interrupt encoding with the two-clock latency
`timescale 1ns/1ps
module tb_swim;
  localparam int RESP_DTACK = 0, RESP_VPA = 1, RESP_BERR = 2, RESP_NONE = 3;
  logic clock = 0, e, as_n, ds_n, rw_n;
  logic [19:0] a;
  logic [2:0] fcode;
  logic [7:0] d_wr;
  logic stepmode_n = 1, runmode_n = 0, advance_n = 1, hold_n = 0;
  logic abort_n = 1, noabort_n = 0, irq2_n = 1, irq5_n = 1;
  logic run_n, berr_n, ipl20_n, ipl1_n, addr, fc, dtack_n;
  int checks = 0, failures = 0, n_berr = 0, n_steps = 0;

  always #125 clock = ~clock;

  assign dtack_n = !(addr && !run_n && !as_n);

  m68008_bus cpu (.clock, .e, .a, .fcode, .as_n, .ds_n, .rw_n, .d_wr,
                  .d_rd(8'h00), .dtack_n, .vpa_n(1'b1), .berr_n);

  swim dut (.a19(a[19]), .a18(a[18]), .a17(a[17]), .a14(a[14]),
            .clock, .e, .as_n, .fc2(fcode[2]), .fc1(fcode[1]), .fc0(fcode[0]),
            .stepmode_n, .runmode_n, .advance_n, .hold_n,
            .abort_n, .noabort_n, .irq2_n, .irq5_n,
            .run_n, .berr_n, .ipl20_n, .ipl1_n, .addr, .fc);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic throw(ref logic open_c, ref logic close_c);
    open_c = 1; #20;
    repeat (3) begin close_c = 0; #5; close_c = 1; #5; end
    close_c = 0; #20;
  endtask

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int resp, clocks;
    logic [7:0] rd;
    repeat (4) @(posedge clock);
    // RUN mode bus cycles
    for (int n = 0; n < 60; n++) begin
      logic [19:0] adr;
      logic [2:0] fcv;
      bit decoded;
      adr = 20'($urandom);
      if (n % 2 == 0) begin adr[19:17] = 0; adr[14] = 0; end
      fcv = 3'($urandom_range(0, 7));
      decoded = (adr[19:17] == 0) && !adr[14];
      fork
        cpu.cycle(adr, fcv, 0, 8'h00, resp, clocks, rd);
        begin
          @(negedge as_n); #1;
          check(addr == decoded, "ADDR predecode");
          check(fc == (fcv == 3'b111), "FC predecode");
          check(run_n == 0, "RUN* low in RUN mode");
        end
      join
      if (decoded) check(resp == RESP_DTACK && clocks == 1, "decoded cycle acknowledged");
      else begin
        check(resp == RESP_BERR, "undecoded cycle ends with BERR*");
        check(clocks >= 31 && clocks <= 41, $sformatf("BERR* after %0d clocks", clocks));
        n_berr++;
      end
      #1 check(berr_n == 1, "BERR* released with AS*");
    end
    // STEP mode: each cycle needs one press.
    throw(runmode_n, stepmode_n);
    for (int n = 0; n < 6; n++) begin
      logic [19:0] adr;
      adr = 20'($urandom_range(0, 'h3FFF));
      if (n == 5) adr = 20'h40000;   // undecoded: still no BERR* in STEP mode
      fork
        cpu.cycle(adr, 3'b101, 0, 8'h00, resp, clocks, rd);
        begin
          @(negedge as_n);
          repeat (60) @(posedge clock);
          check(as_n == 0 && run_n == 1 && berr_n == 1, "cycle frozen in STEP mode");
          throw(hold_n, advance_n);
          n_steps++;
          check(run_n == 0, "RUN* low after step press");
          throw(advance_n, hold_n);
        end
      join_any
      if (n == 5) begin
        // undecoded address never completes: go back to RUN to free it
        throw(stepmode_n, runmode_n);
        wait fork;
        check(resp == RESP_BERR, "undecoded cycle errors once back in RUN");
      end else begin
        wait fork;
        check(resp == RESP_DTACK && clocks >= 60, $sformatf("stepped cycle completed resp=%0d clocks=%0d steps=%0d", resp, clocks, n_steps));
      end
    end
    // Interrupts
    for (int n = 0; n < 40; n++) begin
      bit p, r2, r5;
      logic [1:0] exp;
      p = $urandom_range(0, 3) == 0; r2 = $urandom_range(0, 1); r5 = $urandom_range(0, 1);
      @(negedge clock);
      irq2_n = !r2; irq5_n = !r5;
      if (p) throw(noabort_n, abort_n); else throw(abort_n, noabort_n);
      exp = p ? 2'b00 : r5 ? 2'b01 : r2 ? 2'b10 : 2'b11;
      repeat (2) @(posedge clock); #1;
      check({ipl20_n, ipl1_n} == exp, "interrupt level");
    end
    check(n_berr > 0 && n_steps == 6, "watchdog and stepping both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
