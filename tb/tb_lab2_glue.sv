// tb_lab2_glue: end-to-end test of the complete glue logic (SWIM + ADDV)
// at its default configuration, in a model of the whole Lab 2 computer:
// an MC68008 bus-cycle model, two 8 KiB x 8 ROMs, two 8 KiB x 8 RAMs, a
// two-register ACIA and a four-register PIA (both clocked by E), and the
// three switches. Data really moves: each read returns what the enabled
// device drives and is compared with the expected contents.
//
// Sequence: reset and the 8-cycle boot vector fetch from ROM; RAM
// writes and read-back; ROM reads; ACIA and PIA writes and read-back, also
// through an alias address; bus errors on an unmapped address and on a ROM
// write; interrupts at levels 2, 5 and 7 each followed by an
// auto-vectored interrupt acknowledge; single stepping (frozen cycles with
// no bus error, one cycle per press) and the return to RUN. Every mechanism
// is counted and a mechanism that never occurred counts as a failure.
//
// ROM contents: byte at offset x (14 bits) = x[7:0] ^ {x[13:8], 2'b01} ^ 8'hA5.
`timescale 1ns/1ps
module tb_lab2_glue;
  localparam int RESP_DTACK = 0, RESP_VPA = 1, RESP_BERR = 2, RESP_NONE = 3;
  localparam logic [2:0] FC_UD = 3'b001, FC_SD = 3'b101, FC_SP = 3'b110,
                         FC_CPU = 3'b111;

  logic clock = 0, e, as_n, ds_n, rw_n, reset_n = 1;
  logic [19:0] a;
  logic [2:0] fcode;
  logic [7:0] d_wr, d_rd;
  logic stepmode_n = 1, runmode_n = 0, advance_n = 1, hold_n = 0;
  logic abort_n = 1, noabort_n = 0, irq2_n = 1, irq5_n = 1;
  logic ramen0_n, ramen1_n, romen0_n, romen1_n, aciaen_n, piaen_n;
  logic dtack_n, vpa_n, berr_n, ipl20_n, ipl1_n, run_n;
  int checks = 0, failures = 0;

  always #125 clock = ~clock;

  m68008_bus cpu (.clock, .e, .a, .fcode, .as_n, .ds_n, .rw_n, .d_wr, .d_rd,
                  .dtack_n, .vpa_n, .berr_n);

  lab2_glue dut (.clock, .e, .reset_n, .a, .fcode, .as_n, .ds_n, .rw_n,
                 .stepmode_n, .runmode_n, .advance_n, .hold_n,
                 .abort_n, .noabort_n, .irq2_n, .irq5_n,
                 .ramen0_n, .ramen1_n, .romen0_n, .romen1_n,
                 .aciaen_n, .piaen_n, .dtack_n, .vpa_n, .berr_n,
                 .ipl20_n, .ipl1_n, .run_n);

  // ---------------- memory and peripheral models ----------------
  function automatic logic [7:0] rom_byte(input logic [13:0] x);
    return x[7:0] ^ {x[13:8], 2'b01} ^ 8'hA5;
  endfunction

  logic [7:0] ram [0:16383];
  logic [7:0] acia_reg [0:1];
  logic [7:0] pia_reg [0:3];

  initial begin
    foreach (ram[i]) ram[i] = 8'h00;
    acia_reg[0] = 0; acia_reg[1] = 0;
    foreach (pia_reg[i]) pia_reg[i] = 0;
  end

  // Static RAMs: write while enabled with R/W* low.
  always @(negedge clock)
    if (!rw_n) begin
      if (!ramen0_n) ram[{a[13:1], 1'b0}] <= d_wr;
      if (!ramen1_n) ram[{a[13:1], 1'b1}] <= d_wr;
    end
  // 6800-family peripherals transfer at the falling edge of E.
  always @(negedge e)
    if (!rw_n) begin
      if (!aciaen_n) acia_reg[a[1]] <= d_wr;
      if (!piaen_n)  pia_reg[a[2:1]] <= d_wr;
    end

  always_comb begin
    d_rd = 8'hFF;
    if (!romen0_n) d_rd = rom_byte({a[13:1], 1'b0});
    if (!romen1_n) d_rd = rom_byte({a[13:1], 1'b1});
    if (!ramen0_n) d_rd = ram[{a[13:1], 1'b0}];
    if (!ramen1_n) d_rd = ram[{a[13:1], 1'b1}];
    if (!aciaen_n) d_rd = acia_reg[a[1]];
    if (!piaen_n)  d_rd = pia_reg[a[2:1]];
  end

  // ---------------- mechanism counters ----------------
  int n_boot_rom = 0, n_ram = 0, n_rom_wait = 0, n_vpa = 0, n_vma_acia = 0,
      n_vma_pia = 0, n_berr = 0, n_iack = 0, n_step_freeze = 0,
      n_step_advance = 0, n_alias = 0;
  int n_level[8];
  logic seen_ram, seen_acia, seen_pia;
  always @(negedge as_n) begin seen_ram = 0; seen_acia = 0; seen_pia = 0; end
  always @(posedge clock)
    if (!as_n) begin
      seen_ram  |= !ramen0_n || !ramen1_n;
      seen_acia |= !aciaen_n;
      seen_pia  |= !piaen_n;
    end
  always @(posedge clock) n_level[{!ipl20_n, !ipl1_n, !ipl20_n}]++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic rd(input logic [19:0] adr, input logic [2:0] fcv,
                    output int resp, output int clocks, output logic [7:0] data);
    cpu.cycle(adr, fcv, 0, 8'h00, resp, clocks, data);
  endtask

  task automatic wr(input logic [19:0] adr, input logic [2:0] fcv,
                    input logic [7:0] data, output int resp, output int clocks);
    logic [7:0] dummy;
    cpu.cycle(adr, fcv, 1, data, resp, clocks, dummy);
  endtask

  task automatic throw(ref logic open_c, ref logic close_c);
    open_c = 1; #20;
    repeat (3) begin close_c = 0; #5; close_c = 1; #5; end
    close_c = 0; #20;
  endtask

  initial begin
    repeat (400000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int resp, clocks;
    logic [7:0] data;
    logic [19:0] adrs [0:63];
    logic [7:0]  vals [0:63];

    #10 reset_n = 0;
    repeat (4) @(posedge clock);
    reset_n = 1;

    // 1. boot: vectors at $00000-$00007 come from ROM offsets 0-7
    for (int i = 0; i < 8; i++) begin
      rd(20'(i), FC_SP, resp, clocks, data);
      check(resp == RESP_DTACK && data == rom_byte(14'(i)) && !seen_ram,
            $sformatf("boot vector byte %0d = %02h", i, data));
      if (resp == RESP_DTACK && !seen_ram) n_boot_rom++;
    end

    // 2. RAM: write distinct bytes, read them back, zero wait states
    for (int i = 0; i < 64; i++) begin
      adrs[i] = 20'((i * 263 + 5) % 16384);
      vals[i] = 8'($urandom);
      wr(adrs[i], FC_UD, vals[i], resp, clocks);
      check(resp == RESP_DTACK && clocks == 1 && seen_ram, "RAM write acknowledged");
    end
    for (int i = 0; i < 64; i++) begin
      rd(adrs[i], FC_UD, resp, clocks, data);
      check(resp == RESP_DTACK && clocks == 1 && data == vals[i],
            $sformatf("RAM read %05h = %02h expected %02h", adrs[i], data, vals[i]));
      if (resp == RESP_DTACK && clocks == 1) n_ram++;
    end

    // 3. ROM reads (default: no wait states, DTACK* after the first rising clock)
    for (int i = 0; i < 32; i++) begin
      logic [13:0] off;
      off = 14'($urandom);
      rd(20'h08000 + 20'(off), FC_SP, resp, clocks, data);
      check(resp == RESP_DTACK && clocks == 1 && data == rom_byte(off),
            $sformatf("ROM read %04h = %02h", off, data));
      if (resp == RESP_DTACK) n_rom_wait++;
    end

    // 4. ACIA and PIA through VPA*/VMA, including alias addresses
    for (int i = 0; i < 2; i++) begin
      wr(20'h10040 + 20'(2 * i), FC_SD, 8'h30 + 8'(i), resp, clocks);
      check(resp == RESP_VPA && seen_acia, "ACIA write via VPA*");
    end
    for (int i = 0; i < 4; i++) begin
      wr(20'h10081 + 20'(2 * i), FC_SD, 8'h60 + 8'(i), resp, clocks);
      check(resp == RESP_VPA && seen_pia, "PIA write via VPA*");
    end
    for (int i = 0; i < 2; i++) begin
      rd(20'h10040 + 20'(2 * i), FC_SD, resp, clocks, data);
      check(resp == RESP_VPA && seen_acia && data == 8'h30 + 8'(i), "ACIA read back");
      if (resp == RESP_VPA) n_vpa++;
      if (seen_acia) n_vma_acia++;
    end
    for (int i = 0; i < 4; i++) begin
      rd(20'h10081 + 20'(2 * i), FC_SD, resp, clocks, data);
      check(resp == RESP_VPA && seen_pia && data == 8'h60 + 8'(i), "PIA read back");
      if (seen_pia) n_vma_pia++;
    end
    rd(20'h13F7E, FC_SD, resp, clocks, data);   // ACIA alias, register 1
    check(resp == RESP_VPA && seen_acia && data == 8'h31, "ACIA alias at $13F7E");
    rd(20'h13FBF, FC_SD, resp, clocks, data);   // PIA alias, register 3
    check(resp == RESP_VPA && seen_pia && data == 8'h63, "PIA alias at $13FBF");
    if (seen_pia) n_alias++;
    rd(20'h10001, FC_SD, resp, clocks, data);   // ECB PI/T address: VPA* only
    check(resp == RESP_VPA && !seen_pia && !seen_acia, "ECB PI/T address ignored");

    // 5. bus errors from the watchdog
    rd(20'h40000, FC_UD, resp, clocks, data);
    check(resp == RESP_BERR && clocks >= 31 && clocks <= 41,
          $sformatf("unmapped read: BERR* after %0d clocks", clocks));
    if (resp == RESP_BERR) n_berr++;
    wr(20'h08010, FC_SD, 8'h55, resp, clocks);
    check(resp == RESP_BERR, "ROM write ends in bus error");
    if (resp == RESP_BERR) n_berr++;

    // 6. interrupts, each acknowledged with an auto-vector cycle
    for (int lvl = 0; lvl < 3; lvl++) begin
      int exp_level;
      @(negedge clock);
      case (lvl)
        0: begin irq2_n = 0; exp_level = 2; end
        1: begin irq5_n = 0; exp_level = 5; end
        default: begin throw(noabort_n, abort_n); exp_level = 7; end
      endcase
      repeat (2) @(posedge clock); #1;
      check({!ipl20_n, !ipl1_n, !ipl20_n} == 3'(exp_level),
            $sformatf("IPL encodes level %0d", exp_level));
      rd(20'hFFFF1 | 20'(exp_level << 1), FC_CPU, resp, clocks, data);
      check(resp == RESP_VPA, "interrupt acknowledge auto-vectored");
      if (resp == RESP_VPA) n_iack++;
    end
    throw(abort_n, noabort_n);
    irq2_n = 1; irq5_n = 1;
    repeat (3) @(posedge clock); #1;
    check(ipl20_n && ipl1_n, "no interrupt pending");

    // 7. single step: each cycle frozen until the step switch is pressed
    throw(runmode_n, stepmode_n);
    for (int i = 0; i < 4; i++) begin
      fork
        rd(adrs[i], FC_UD, resp, clocks, data);
        begin
          @(negedge as_n);
          repeat (80) @(posedge clock);   // longer than the watchdog limit
          check(!as_n && run_n && berr_n && dtack_n, "step: cycle frozen, no BERR*");
          if (!as_n && run_n) n_step_freeze++;
          throw(hold_n, advance_n);
          n_step_advance++;
          throw(advance_n, hold_n);
        end
      join
      check(resp == RESP_DTACK && data == vals[i] && clocks >= 80,
            $sformatf("stepped RAM read, %0d clocks", clocks));
    end
    // A ROM read too, single stepped.
    fork
      rd(20'h08123, FC_SP, resp, clocks, data);
      begin
        @(negedge as_n);
        repeat (50) @(posedge clock);
        check(!as_n && run_n, "step: ROM cycle frozen");
        throw(hold_n, advance_n);
        throw(advance_n, hold_n);
      end
    join
    check(resp == RESP_DTACK && data == rom_byte(14'h0123), "stepped ROM read");
    throw(stepmode_n, runmode_n);
    rd(adrs[5], FC_UD, resp, clocks, data);
    check(resp == RESP_DTACK && clocks == 1 && data == vals[5], "RUN mode again");

    // every mechanism must have happened
    check(n_boot_rom == 8, "boot ROM mapping");
    check(n_ram > 0, "zero-wait RAM");
    check(n_rom_wait > 0, "ROM DTACK*");
    check(n_vpa > 0, "VPA* cycles");
    check(n_vma_acia > 0, "VMA-gated ACIA enable");
    check(n_vma_pia > 0, "VMA-gated PIA enable");
    check(n_alias > 0, "alias decode");
    check(n_berr == 2, "watchdog bus errors");
    check(n_iack == 3, "auto-vectored acknowledges");
    check(n_level[2] > 0 && n_level[5] > 0 && n_level[7] > 0, "levels 2, 5, 7");
    check(n_step_freeze == 4 && n_step_advance == 4, "single-step freeze and advance");
    $display("mechanisms: boot=%0d ram=%0d rom=%0d vpa=%0d acia=%0d pia=%0d alias=%0d berr=%0d iack=%0d freeze=%0d step=%0d",
             n_boot_rom, n_ram, n_rom_wait, n_vpa, n_vma_acia, n_vma_pia, n_alias,
             n_berr, n_iack, n_step_freeze, n_step_advance);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
