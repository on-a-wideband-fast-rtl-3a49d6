// cplx_mult: pipelined complex multiplier p = a * w.
//
// Four real 18x18 multipliers and two adders: pr = ar*wr - ai*wi and
// pi = ar*wi + ai*wr, the classic four-multiplier form the design uses for
// each butterfly. The product is kept at full precision (2*DW+1 bits, scaled
// by 2^(DW-1) relative to a because w is a Q1.17 fraction) and rounded later,
// once, in the adder/subtracter that follows.
// Timing: two register stages (products, then sums); latency 2, one product
// per clock. valid travels with the data.
module cplx_mult
  import fft_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  cplx_t                 a,
  input  cplx_t                 w,
  output logic                  out_valid,
  output logic signed [2*DW:0]  pr,
  output logic signed [2*DW:0]  pi
);
  logic signed [2*DW-1:0] m_rr, m_ii, m_ri, m_ir;
  logic                   v1;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; out_valid <= 1'b0;
      m_rr <= '0; m_ii <= '0; m_ri <= '0; m_ir <= '0;
      pr <= '0; pi <= '0;
    end else begin
      v1        <= in_valid;
      m_rr      <= a.re * w.re;
      m_ii      <= a.im * w.im;
      m_ri      <= a.re * w.im;
      m_ir      <= a.im * w.re;
      out_valid <= v1;
      pr        <= (2*DW+1)'(m_rr) - (2*DW+1)'(m_ii);
      pi        <= (2*DW+1)'(m_ri) + (2*DW+1)'(m_ir);
    end
  end
endmodule
