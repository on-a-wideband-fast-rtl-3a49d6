// ddr2_mem_model: behavioural model of one transpose memory channel.
//
// Stands in for the off-chip DDR2 SDRAM and its vendor controller, which are
// not part of the RTL. It is a plain array of 2^AW complex points with two
// write ports and two read ports per clock and a fixed read latency of RDLAT
// clocks (the controller's scheduling, refresh and bursts are not modelled).
// Unwritten words read as zero. Only for simulation with small AW.
module ddr2_mem_model
  import fft_pkg::*;
#(
  parameter int AW    = 7,
  parameter int RDLAT = 4
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr0,
  input  logic [AW-1:0] waddr1,
  input  cplx_t         wdata0,
  input  cplx_t         wdata1,
  input  logic          re,
  input  logic [AW-1:0] raddr0,
  input  logic [AW-1:0] raddr1,
  output cplx_t         rdata0,
  output cplx_t         rdata1
);
  cplx_t mem [2**AW];
  cplx_t p0 [RDLAT];
  cplx_t p1 [RDLAT];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    for (int i = 0; i < RDLAT; i++) begin p0[i] = '0; p1[i] = '0; end
  end

  always_ff @(posedge clk) begin
    p0[0] <= re ? mem[raddr0] : '0;
    p1[0] <= re ? mem[raddr1] : '0;
    for (int i = 1; i < RDLAT; i++) begin
      p0[i] <= p0[i-1];
      p1[i] <= p1[i-1];
    end
    if (we) begin
      mem[waddr0] <= wdata0;
      mem[waddr1] <= wdata1;
    end
  end

  assign rdata0 = p0[RDLAT-1];
  assign rdata1 = p1[RDLAT-1];
endmodule
