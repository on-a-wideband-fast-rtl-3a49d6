// fft_stage: one radix-2 decimation-in-time stage of a radix-2^k unit.
//
// Local stage L of unit UNIT is global stage i = UNIT*K + L of the N-point
// FFT (N = 2^LOG2N). It takes a two-lane stream whose pairs join points at
// distance 2^(L-2) (adjacent points for L = 1), regroups them with a
// timing_adjuster into pairs at distance 2^(L-1), and applies the butterfly
// X0 = (u + W v)/2, X1 = (u - W v)/2.
// Twiddle: the pair count t after the adjuster gives the stream position P of
// the lower point (fft_pkg::pair_pos). The units before this one have rotated
// the stream index by UNIT*K bits (transposes), so the in-place index of the
// point is n = rotl(P, UNIT*K); the DIT twiddle of global stage i is
// W_(2^i)^(n mod 2^(i-1)), i.e. phase (n mod 2^(i-1)) * 2^(LOG2N-i) of the
// N-point circle, which the pipelined CORDIC turns into cos - j sin. The data
// waits in a delay line for the CORDIC latency.
// Timing: latency (L >= 2 ? 2^(L-2) + 1 : 0) + ITER + 3 + 3 cycles.
module fft_stage
  import fft_pkg::*;
#(
  parameter int LOG2N = 30,
  parameter int K     = 10,
  parameter int UNIT  = 0,
  parameter int L     = 1,
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
  localparam int GI   = UNIT * K + L;      // global stage number
  localparam int TW   = LOG2N - 1;         // pair counter width
  localparam int CLAT = ITER + 3;          // CORDIC latency

  logic  av;
  cplx_t a0, a1;

  if (L >= 2) begin : g_adj
    timing_adjuster #(.D(1 << (L - 2)), .CNTW(TW)) u_adj (
      .clk, .rst, .in_valid, .in0, .in1,
      .out_valid(av), .out0(a0), .out1(a1)
    );
  end else begin : g_noadj
    assign av = in_valid;
    assign a0 = in0;
    assign a1 = in1;
  end

  // twiddle phase from the pair count
  logic [TW-1:0]    t;
  logic [LOG2N-1:0] phase;
  always_ff @(posedge clk) begin
    if (rst)     t <= '0;
    else if (av) t <= t + 1'b1;
  end

  always_comb begin
    logic [63:0] p, n, j;
    p     = pair_pos(64'(t), L);
    n     = rotl(p, LOG2N, UNIT * K);
    j     = n & ((64'd1 << (GI - 1)) - 64'd1);
    phase = LOG2N'(j << (LOG2N - GI));
  end

  cplx_t wt;
  logic  wv;
  cordic #(.PW(LOG2N), .ITER(ITER)) u_cordic (
    .clk, .rst, .in_valid(av), .phase, .out_valid(wv), .w(wt)
  );

  cplx_t b0, b1;
  delay_line #(.W(2*DW), .D(CLAT)) u_du (.clk, .rst, .din(a0), .dout(b0));
  delay_line #(.W(2*DW), .D(CLAT)) u_dv (.clk, .rst, .din(a1), .dout(b1));

  butterfly u_bf (
    .clk, .rst, .in_valid(wv), .u(b0), .v(b1), .w(wt),
    .out_valid, .x0(out0), .x1(out1), .sat
  );
endmodule
