// m68008_bus: behavioural model of the MC68008 bus interface, for
// testbenches only (not synthesizable, not part of the design).
//
// Generates the E clock from the CPU clock (period 10 clocks: 6 low,
// 4 high) and runs asynchronous bus cycles on request through the task
// cycle(). Timing follows the 68000 family in simplified form:
//   rising clock          address, FC and R/W* driven
//   next falling clock    AS* low (and DS* low for reads)
//   next falling clock    DS* low for writes (write data already driven)
//   every falling clock   DTACK*, BERR* and VPA* sampled
//   DTACK* seen           read data captured, strobes released at the
//                         following falling clock
//   VPA* seen             6800-style cycle: wait for E to rise and fall,
//                         data captured at the falling E edge, strobes
//                         released at the next falling clock
//   BERR* seen            strobes released at the next falling clock
// "clocks" reports how many falling clock edges passed from AS* falling to
// the edge that saw the response: 1 means no wait states.
`timescale 1ns/1ps
module m68008_bus #(
  parameter int unsigned TIMEOUT = 200  // clocks before the model gives up
) (
  input  logic        clock,
  output logic        e,
  output logic [19:0] a,
  output logic [2:0]  fcode,
  output logic        as_n,
  output logic        ds_n,
  output logic        rw_n,
  output logic [7:0]  d_wr,
  input  logic [7:0]  d_rd,
  input  logic        dtack_n,
  input  logic        vpa_n,
  input  logic        berr_n
);


  // How a bus cycle ended (the same codes are declared by each testbench).
  localparam int RESP_DTACK = 0, RESP_VPA = 1, RESP_BERR = 2, RESP_NONE = 3;

  int ediv = 0;

  initial begin
    e = 0; a = '0; fcode = 3'b101; as_n = 0; ds_n = 1; rw_n = 1; d_wr = '0;
    #1 as_n = 1;  // a rising AS* edge clears the strobe-cleared registers
  end

  always @(posedge clock) begin
    ediv <= (ediv == 9) ? 0 : ediv + 1;
    e    <= (ediv >= 5) && (ediv <= 8);
  end

  task automatic cycle(input logic [19:0] adr, input logic [2:0] fcv,
                       input bit write, input logic [7:0] wdata,
                       output int resp, output int clocks,
                       output logic [7:0] rdata);
    resp = RESP_NONE; clocks = 0; rdata = 8'hxx;
    @(posedge clock);
    a = adr; fcode = fcv; rw_n = !write; d_wr = wdata;
    @(negedge clock);
    as_n = 0;
    if (!write) ds_n = 0;
    while (resp == RESP_NONE && clocks < TIMEOUT) begin
      @(negedge clock);
      clocks++;
      if (write) ds_n = 0;
      if (!berr_n)       resp = RESP_BERR;
      else if (!dtack_n) resp = RESP_DTACK;
      else if (!vpa_n)   resp = RESP_VPA;
    end
    if (resp == RESP_DTACK) begin
      @(posedge clock);
      rdata = d_rd;
    end else if (resp == RESP_VPA) begin
      @(posedge e);
      @(negedge e);
      rdata = d_rd;
    end
    @(negedge clock);
    as_n = 1; ds_n = 1;
    @(posedge clock);
    rw_n = 1;
  endtask

endmodule
