// tb_addv: self-checking test of the ADDV chip with a bus-cycle model of
// the MC68008. The SWIM's two predecode outputs are computed here from the
// address and function code. It checks, for every bus cycle, which enable
// fell and which response (DTACK*, VPA*, none) came after how many clocks:
//   - the 8 bus cycles after reset read ROM whatever the address, RAM off
//   - RAM reads and writes in $0000-$3FFF: right byte lane, zero wait
//   - ROM reads in $8000-$BFFF: 1, 2, 3 clocks for ROMWS = 00, 01, 10
//   - ROM writes and unmapped addresses: no enable, no acknowledge
//   - ACIA (even, $10040) and PIA (odd, $10081) and their aliases: VPA*,
//     then the device enable; other $1xxxx addresses: VPA* only
//   - interrupt acknowledge (FC = 7): VPA*, no enable
//   - ROMWS = 11: no DTACK* for RAM or ROM
`timescale 1ns/1ps
module tb_addv;
  import glue_pkg::*;
  // bus-cycle outcomes reported by m68008_bus
  localparam int RESP_DTACK = 0, RESP_VPA = 1, RESP_BERR = 2, RESP_NONE = 3;
  logic clock = 0, e, as_n, ds_n, rw_n, reset_n = 1;
  logic [19:0] a;
  logic [2:0] fcode;
  logic [7:0] d_wr, d_rd;
  logic romws1 = 0, romws0 = 0;
  logic ramen0_n, ramen1_n, romen0_n, romen1_n, aciaen_n, piaen_n, vpa_n, dtack_n;
  logic addr, fc;
  int checks = 0, failures = 0;
  // enables seen during the current cycle, one bit each:
  // {ramen0, ramen1, romen0, romen1, aciaen, piaen}
  logic [5:0] seen;

  always #125 clock = ~clock;

  assign addr = (a[19:17] == 3'b000) && !a[14];
  assign fc   = (fcode == 3'b111);
  assign d_rd = 8'h00;

  m68008_bus cpu (.clock, .e, .a, .fcode, .as_n, .ds_n, .rw_n, .d_wr, .d_rd,
                  .dtack_n, .vpa_n, .berr_n(1'b1));

  addv dut (.a16(a[16]), .a15(a[15]), .a7(a[7]), .a6(a[6]), .a0(a[0]),
            .clock, .as_n, .ds_n, .rw_n, .reset_n, .fc, .addr,
            .romws1, .romws0, .e,
            .ramen0_n, .ramen1_n, .romen0_n, .romen1_n,
            .aciaen_n, .piaen_n, .vpa_n, .dtack_n);

  always @(negedge as_n) seen = '0;
  always @(posedge clock)
    if (!as_n) seen |= ~{ramen0_n, ramen1_n, romen0_n, romen1_n, aciaen_n, piaen_n};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One bus cycle and its expected outcome.
  task automatic run(input logic [19:0] adr, input logic [2:0] fcv,
                     input bit write, input logic [5:0] exp_seen,
                     input int exp_resp, input int exp_clocks,
                     input string what);
    int resp;
    int clocks;
    logic [7:0] rdata;
    cpu.cycle(adr, fcv, write, 8'h00, resp, clocks, rdata);
    check(seen == exp_seen, $sformatf("%s: enables %06b expected %06b", what, seen, exp_seen));
    check(resp == exp_resp, $sformatf("%s: response %0d expected %0d", what, resp, exp_resp));
    if (exp_clocks > 0)
      check(clocks == exp_clocks, $sformatf("%s: %0d clocks expected %0d", what, clocks, exp_clocks));
  endtask

  localparam logic [2:0] FC_UD = 3'b001, FC_UP = 3'b010, FC_SD = 3'b101,
                         FC_SP = 3'b110, FC_CPU = 3'b111;

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // RESET* is an asynchronous clear: give it a falling edge.
    #10 reset_n = 0;
    repeat (5) @(posedge clock);
    reset_n = 1;
    // Boot: 8 reads of the vectors at $00000-$00007 come from ROM.
    for (int i = 0; i < 8; i++)
      run(20'(i), FC_SP, 0, i[0] ? 6'b000100 : 6'b001000, RESP_DTACK, 1,
          "boot vector read");
    for (int n = 0; n < 200; n++) begin
      logic [19:0] adr;
      bit wr;
      int k;
      wr = $urandom_range(0, 1);
      k = $urandom_range(0, 7);
      case (k)
        0: begin // RAM
          adr = 20'($urandom_range(0, 'h3FFF));
          run(adr, FC_UD, wr, adr[0] ? 6'b010000 : 6'b100000, RESP_DTACK, 1,
              $sformatf("RAM %s %05h", wr ? "write" : "read", adr));
        end
        1: begin // ROM read, chosen wait states
          int ws;
          ws = $urandom_range(0, 2);
          {romws1, romws0} = 2'(ws);
          adr = 20'($urandom_range('h8000, 'hBFFF));
          run(adr, FC_SP, 0, adr[0] ? 6'b000100 : 6'b001000, RESP_DTACK, ws + 1,
              $sformatf("ROM read %05h ws code %0d", adr, ws));
          {romws1, romws0} = 2'b00;
        end
        2: begin // ROM write: ignored
          adr = 20'($urandom_range('h8000, 'hBFFF));
          run(adr, FC_SD, 1, 6'b000000, RESP_NONE, 0, "ROM write");
        end
        3: begin // ACIA and its aliases
          adr = 20'($urandom_range('h10000, 'h13FFF));
          adr[7:6] = 2'b01; adr[0] = 0;
          run(adr, FC_SD, wr, 6'b000010, RESP_VPA, 0, $sformatf("ACIA %05h", adr));
        end
        4: begin // PIA and its aliases
          adr = 20'($urandom_range('h10000, 'h13FFF));
          adr[7:6] = 2'b10; adr[0] = 1;
          run(adr, FC_SD, wr, 6'b000001, RESP_VPA, 0, $sformatf("PIA %05h", adr));
        end
        5: begin // other 6800-range addresses: VPA* only
          adr = 20'($urandom_range('h10000, 'h13FFF));
          adr[6] = adr[7];
          run(adr, FC_SD, wr, 6'b000000, RESP_VPA, 0, $sformatf("6800 range %05h", adr));
        end
        6: begin // interrupt acknowledge: autovector
          adr = 20'hFFFF0 | 20'($urandom_range(0, 7) << 1) | 20'h1;
          run(adr, FC_CPU, 0, 6'b000000, RESP_VPA, 0, "interrupt acknowledge");
        end
        default: begin // unmapped
          adr = 20'($urandom_range('h14000, 'hFFFFF));
          if (adr[19:17] == 0 && !adr[14]) adr[19] = 1;
          run(adr, FC_UD, wr, 6'b000000, RESP_NONE, 0, $sformatf("unmapped %05h", adr));
        end
      endcase
    end
    // DTACK* inhibit (single step): RAM and ROM get no acknowledge.
    {romws1, romws0} = 2'b11;
    run(20'h00123, FC_UD, 0, 6'b010000, RESP_NONE, 0, "inhibited RAM");
    run(20'h08124, FC_SP, 0, 6'b001000, RESP_NONE, 0, "inhibited ROM");
    // A new reset brings the boot mapping back.
    reset_n = 0; #300 reset_n = 1;
    {romws1, romws0} = 2'b00;
    run(20'h00000, FC_SP, 0, 6'b001000, RESP_DTACK, 1, "boot after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
