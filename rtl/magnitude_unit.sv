// magnitude_unit: power spectrum of two FFT outputs per clock.
//
// P = re^2 + im^2 for each lane, the last step of a digital spectrometer
// after the Fourier transform. Two real multipliers and one adder per lane,
// full precision (2*DW bits, unsigned). Timing: latency 2.
module magnitude_unit
  import fft_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  cplx_t         x0,
  input  cplx_t         x1,
  output logic          out_valid,
  output logic [2*DW-1:0] p0,
  output logic [2*DW-1:0] p1
);
  logic [2*DW-2:0] r0, i0, r1, i1;   // squares fit in 2*DW-1 bits
  logic            v1;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; out_valid <= 1'b0;
      r0 <= '0; i0 <= '0; r1 <= '0; i1 <= '0; p0 <= '0; p1 <= '0;
    end else begin
      v1        <= in_valid;
      r0        <= (2*DW-1)'(x0.re * x0.re);
      i0        <= (2*DW-1)'(x0.im * x0.im);
      r1        <= (2*DW-1)'(x1.re * x1.re);
      i1        <= (2*DW-1)'(x1.im * x1.im);
      out_valid <= v1;
      p0        <= (2*DW)'(r0) + (2*DW)'(i0);
      p1        <= (2*DW)'(r1) + (2*DW)'(i1);
    end
  end
endmodule
