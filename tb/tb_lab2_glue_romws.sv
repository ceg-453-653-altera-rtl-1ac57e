// tb_lab2_glue_romws: the glue logic in its three ROM wait-state wirings.
// One instance each of lab2_glue with ROM_WAIT_STATES = 0, 2 and 4 shares a
// bus-cycle model (only one instance's outputs are routed back to the CPU
// at a time). For each wiring it checks that ROM reads take 1, 2 and 3
// clocks from AS* to DTACK* (0, 2, 4 wait states), that RAM stays at zero
// wait states, and that single stepping inhibits DTACK* in every wiring.
`timescale 1ns/1ps
module tb_lab2_glue_romws;
  localparam int RESP_DTACK = 0, RESP_VPA = 1, RESP_BERR = 2, RESP_NONE = 3;
  logic clock = 0, e, as_n, ds_n, rw_n, reset_n = 1;
  logic [19:0] a;
  logic [2:0] fcode;
  logic [7:0] d_wr;
  logic stepmode_n = 1, runmode_n = 0, advance_n = 1, hold_n = 0;
  logic [2:0] dtack_v, berr_v, vpa_v, run_v;
  logic dtack_n, berr_n, vpa_n;
  int sel = 0;
  int checks = 0, failures = 0;

  always #125 clock = ~clock;

  assign dtack_n = dtack_v[sel];
  assign berr_n  = berr_v[sel];
  assign vpa_n   = vpa_v[sel];

  m68008_bus cpu (.clock, .e, .a, .fcode, .as_n, .ds_n, .rw_n, .d_wr,
                  .d_rd(8'h00), .dtack_n, .vpa_n, .berr_n);

  for (genvar g = 0; g < 3; g++) begin : g_cfg
    lab2_glue #(.ROM_WAIT_STATES(2 * g)) dut (
      .clock, .e, .reset_n, .a, .fcode, .as_n, .ds_n, .rw_n,
      .stepmode_n, .runmode_n, .advance_n, .hold_n,
      .abort_n(1'b1), .noabort_n(1'b0), .irq2_n(1'b1), .irq5_n(1'b1),
      .ramen0_n(), .ramen1_n(), .romen0_n(), .romen1_n(),
      .aciaen_n(), .piaen_n(), .dtack_n(dtack_v[g]), .vpa_n(vpa_v[g]),
      .berr_n(berr_v[g]), .ipl20_n(), .ipl1_n(), .run_n(run_v[g]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic throw(ref logic open_c, ref logic close_c);
    open_c = 1; #20;
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
    logic [7:0] data;
    #10 reset_n = 0;
    repeat (4) @(posedge clock);
    reset_n = 1;
    for (int i = 0; i < 8; i++) cpu.cycle(20'(i), 3'b110, 0, 8'h00, resp, clocks, data);
    for (int g = 0; g < 3; g++) begin
      sel = g;
      for (int i = 0; i < 10; i++) begin
        cpu.cycle(20'h08000 + 20'($urandom_range(0, 'h3FFF)), 3'b110, 0, 8'h00,
                  resp, clocks, data);
        check(resp == RESP_DTACK && clocks == g + 1,
              $sformatf("%0d wait states: ROM read took %0d clocks", 2 * g, clocks));
        cpu.cycle(20'($urandom_range(0, 'h3FFF)), 3'b001, i[0], 8'h00,
                  resp, clocks, data);
        check(resp == RESP_DTACK && clocks == 1, "RAM zero wait states");
      end
    end
    // single step inhibits DTACK* in all three wirings
    throw(runmode_n, stepmode_n);
    for (int g = 0; g < 3; g++) begin
      sel = g;
      fork
        cpu.cycle(20'h08042, 3'b110, 0, 8'h00, resp, clocks, data);
        begin
          @(negedge as_n);
          repeat (30) @(posedge clock);
          check(dtack_n && run_v[g], "DTACK* inhibited while stepping");
          throw(hold_n, advance_n);
          throw(advance_n, hold_n);
        end
      join
      check(resp == RESP_DTACK && clocks >= 30, "stepped ROM read completes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
