// butterfly: radix-2 decimation-in-time butterfly with one shared multiplier.
//
// X0 = (u + W*v) / 2 and X1 = (u - W*v) / 2. Because W^(m+N/2) = -W^m, one
// complex multiplication serves both outputs (the shared-multiplier form of the
// butterfly). The multiplier is cplx_mult (four real multipliers), the adder and
// subtracter is cplx_addsub, which also halves, rounds and saturates.
// u is delayed two cycles to meet the product. Latency 3, one pair per clock.
module butterfly
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  cplx_t u,
  input  cplx_t v,
  input  cplx_t w,
  output logic  out_valid,
  output cplx_t x0,
  output cplx_t x1,
  output logic  sat
);
  logic                 pv;
  logic signed [2*DW:0] pr, pi;
  cplx_t                u1, u2;

  cplx_mult u_mult (
    .clk, .rst, .in_valid, .a(v), .w,
    .out_valid(pv), .pr, .pi
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      u1 <= '0; u2 <= '0;
    end else begin
      u1 <= u;
      u2 <= u1;
    end
  end

  cplx_addsub u_addsub (
    .clk, .rst, .in_valid(pv), .u(u2), .pr, .pi,
    .out_valid, .x0, .x1, .sat
  );
endmodule
