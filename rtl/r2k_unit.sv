// r2k_unit: radix-2^k butterfly unit.
//
// K radix-2 stages in a row (fft_stage), covering global stages UNIT*K+1 to
// UNIT*K+K of the N-point decimation-in-time FFT. Stage L regroups its input
// with a timing adjuster of 2^(L-2) words per lane and makes its own twiddle
// factors with a pipelined CORDIC, so the unit holds no twiddle memory. Input:
// pairs of adjacent stream positions (2t, 2t+1), one pair per clock, frames of
// N/2 pairs back to back. Output: pairs at distance 2^(K-1), in block order
// (fft_pkg::pair_pos with l = K). sat pulses when any butterfly saturated.
// Timing: latency sum over L of the stage latencies (see fft_stage).
module r2k_unit
  import fft_pkg::*;
#(
  parameter int LOG2N = 30,
  parameter int K     = 10,
  parameter int UNIT  = 0,
  parameter int ITER  = LOG2N
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  cplx_t in0,
  input  cplx_t in1,
  output logic  out_valid,
  output cplx_t out0,
  output cplx_t out1,
  output logic  sat
);
  logic  v  [K+1];
  cplx_t d0 [K+1];
  cplx_t d1 [K+1];
  logic [K-1:0] s;

  assign v[0]  = in_valid;
  assign d0[0] = in0;
  assign d1[0] = in1;

  for (genvar l = 1; l <= K; l++) begin : g_stage
    fft_stage #(.LOG2N(LOG2N), .K(K), .UNIT(UNIT), .L(l), .ITER(ITER)) u_stage (
      .clk, .rst, .in_valid(v[l-1]), .in0(d0[l-1]), .in1(d1[l-1]),
      .out_valid(v[l]), .out0(d0[l]), .out1(d1[l]), .sat(s[l-1])
    );
  end

  assign out_valid = v[K];
  assign out0      = d0[K];
  assign out1      = d1[K];
  assign sat       = |s;
endmodule
