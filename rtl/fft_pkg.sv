// fft_pkg: types, constants and index helpers shared by the wideband FFT.
//
// Samples and twiddle factors are 36-bit fixed-point two's-complement complex
// numbers, 18-bit real and 18-bit imaginary part, as in the reference design.
// Twiddle factors use the same format read as Q1.17 (unity = 2^17, saturated
// to 2^17-1). The index helpers describe where a point sits in the stream:
//  - pair_pos(): position of lane 0 of pair t leaving a radix-2 stage whose
//    butterflies join points at distance 2^(l-1) (stage l of a unit);
//  - rotl(): k-bit rotation of an s-bit index, the index map of one transpose.
package fft_pkg;

  localparam int DW = 18;                 // bits per real/imaginary part

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;


  localparam logic signed [DW-1:0] SMAX = (DW)'((1 << (DW - 1)) - 1);
  localparam logic signed [DW-1:0] SMIN = (DW)'(-(1 << (DW - 1)));

  // Rotate the s-bit value v left by r bits (r taken modulo s).
  function automatic logic [63:0] rotl(logic [63:0] v, int s, int r);
    logic [63:0] mask;
    logic [63:0] res;
    int rr;
    mask = (s >= 64) ? '1 : ((64'd1 << s) - 64'd1);
    rr   = (s > 0) ? (r % s) : 0;
    v    = v & mask;
    if (rr == 0) res = v;
    else         res = ((v << rr) | (v >> (s - rr))) & mask;
    return res;
  endfunction

  // Stream position of lane 0 of pair number t, when the pair joins points
  // at distance 2^(l-1): pairs are ordered block by block (blocks of 2^l
  // points), and inside a block by the offset of the lower point.
  function automatic logic [63:0] pair_pos(logic [63:0] t, int l);
    logic [63:0] lowmask;
    lowmask = (64'd1 << (l - 1)) - 64'd1;
    return ((t >> (l - 1)) << l) | (t & lowmask);
  endfunction

endpackage
