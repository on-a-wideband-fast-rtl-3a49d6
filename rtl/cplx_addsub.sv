// cplx_addsub: complex adder/subtracter with scaling, rounding and saturation.
//
// Computes x0 = (u + p) / 2 and x1 = (u - p) / 2, where u is a sample and p a
// full-precision product from cplx_mult (scaled by 2^(DW-1)). u is aligned to
// p, the sum and difference are formed exactly, then divided by 2^DW with
// round-half-up and saturated to DW bits: one halving per radix-2 stage keeps
// the word at 18 bits through all log2(N) stages (the output of the whole FFT
// is the DFT divided by N). The rounding-and-saturation step stands in for the
// DSP block's rounding and saturation unit. sat flags a saturated result.
// Timing: one register stage, latency 1.
module cplx_addsub
  import fft_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  cplx_t                u,
  input  logic signed [2*DW:0] pr,
  input  logic signed [2*DW:0] pi,
  output logic                 out_valid,
  output cplx_t                x0,
  output cplx_t                x1,
  output logic                 sat
);
  localparam int SW = 2 * DW + 2;

  // Round (half up) a value scaled by 2^DW to an integer, then saturate.
  function automatic logic [DW:0] rsu(logic signed [SW-1:0] val);
    logic signed [SW-1:0] r;
    logic                 s;
    logic signed [DW-1:0] q;
    r = (val + SW'(1 << (DW - 1))) >>> DW;
    s = 1'b0;
    if (r > SW'(SMAX))      begin q = SMAX; s = 1'b1; end
    else if (r < SW'(SMIN)) begin q = SMIN; s = 1'b1; end
    else                          q = r[DW-1:0];
    return {s, q};
  endfunction

  logic signed [SW-1:0] ua_re, ua_im;
  logic [DW:0]          r0re, r0im, r1re, r1im;

  always_comb begin
    ua_re = SW'(u.re) <<< (DW - 1);
    ua_im = SW'(u.im) <<< (DW - 1);
    r0re  = rsu(ua_re + SW'(pr));
    r0im  = rsu(ua_im + SW'(pi));
    r1re  = rsu(ua_re - SW'(pr));
    r1im  = rsu(ua_im - SW'(pi));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; x0 <= '0; x1 <= '0; sat <= 1'b0;
    end else begin
      out_valid <= in_valid;
      x0        <= '{re: r0re[DW-1:0], im: r0im[DW-1:0]};
      x1        <= '{re: r1re[DW-1:0], im: r1im[DW-1:0]};
      sat       <= in_valid & (r0re[DW] | r0im[DW] | r1re[DW] | r1im[DW]);
    end
  end
endmodule
