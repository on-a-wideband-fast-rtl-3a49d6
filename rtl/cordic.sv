// cordic: pipelined CORDIC twiddle-factor generator.
//
// Replaces a twiddle-factor memory: from a phase (a PW-bit fraction of a full
// turn, theta = 2*pi*phase/2^PW) it computes W = cos(theta) - j*sin(theta), the
// factor W_N^m for phase = m when PW = log2 N.
// How it works:
//  - The two top phase bits pick the quadrant; the rest, a residual angle in
//    [0, pi/2), is widened to ZF fraction bits (of a turn).
//  - ITER unrolled rotation stages (one register stage each): rotate (x, y) by
//    +/- atan(2^-i) toward the residual angle using only shifts and adds, and
//    update the residual. The rotation constants are worked out at elaboration
//    from atan(2^-i) / (2*pi) * 2^ZF.
//  - The CORDIC gain prod(1/cos(atan(2^-i))) is removed by two constant
//    multipliers (one for x, one for y).
//  - The quadrant is folded back in, the result rounded to 18 bits, saturated
//    to +/-(2^17-1) and sin negated.
// Timing: latency ITER + 3 cycles, one twiddle per clock. valid travels
// with the data. The number of stages defaults to the phase width, log2 N,
// as in the reference design; the x/y guard bits and the angle width are this
// design's choice.
module cordic
  import fft_pkg::*;
#(
  parameter int PW   = 30,    // phase bits (log2 N)
  parameter int ITER = PW     // rotation stages
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic [PW-1:0] phase,
  output logic          out_valid,
  output cplx_t         w
);
  localparam int G   = 3;                              // guard bits on x, y
  localparam int XW  = DW + G + 2;                     // x, y width (gain < 2)
  localparam int ZF  = ((PW > DW + 2) ? PW : DW + 2) + 2; // angle fraction bits
  localparam int ZW  = ZF;                             // |z| < 1/2 turn
  localparam int MW  = DW + 2;                         // gain-correction constant width

  // atan(2^-i) as a fraction of a turn, scaled by 2^ZF.
  function automatic logic signed [ZW-1:0] atan_c(int i);
    real r;
    r = $atan(2.0 ** (-i)) / (2.0 * 3.14159265358979323846) * (2.0 ** ZF);
    return ZW'(longint'(r));
  endfunction

  // 1 / CORDIC gain after ITER stages, scaled by 2^DW.
  function automatic logic signed [MW-1:0] inv_gain();
    real g;
    g = 1.0;
    for (int i = 0; i < ITER; i++) g = g * $sqrt(1.0 + 2.0 ** (-2 * i));
    return MW'(longint'((2.0 ** DW) / g + 0.5));
  endfunction

  localparam logic signed [MW-1:0] INVG = inv_gain();
  localparam logic signed [XW-1:0] UNITY = XW'(1) <<< (DW - 1 + G);

  logic signed [XW-1:0] x [ITER+1];
  logic signed [XW-1:0] y [ITER+1];
  logic signed [ZW-1:0] z [ITER+1];
  logic [1:0]           q [ITER+1];
  logic                 v [ITER+1];

  // stage 0: quadrant split
  always_ff @(posedge clk) begin
    if (rst) begin
      x[0] <= '0; y[0] <= '0; z[0] <= '0; q[0] <= '0; v[0] <= 1'b0;
    end else begin
      x[0] <= UNITY;
      y[0] <= '0;
      z[0] <= ZW'({2'b00, phase[PW-3:0]}) <<< (ZF - PW);
      q[0] <= phase[PW-1:PW-2];
      v[0] <= in_valid;
    end
  end

  // rotation stages
  for (genvar i = 0; i < ITER; i++) begin : g_rot
    localparam logic signed [ZW-1:0] A = atan_c(i);
    always_ff @(posedge clk) begin
      if (rst) begin
        x[i+1] <= '0; y[i+1] <= '0; z[i+1] <= '0; q[i+1] <= '0; v[i+1] <= 1'b0;
      end else begin
        if (z[i] >= 0) begin
          x[i+1] <= x[i] - (y[i] >>> i);
          y[i+1] <= y[i] + (x[i] >>> i);
          z[i+1] <= z[i] - A;
        end else begin
          x[i+1] <= x[i] + (y[i] >>> i);
          y[i+1] <= y[i] - (x[i] >>> i);
          z[i+1] <= z[i] + A;
        end
        q[i+1] <= q[i];
        v[i+1] <= v[i];
      end
    end
  end

  // gain correction: two constant multipliers
  logic signed [XW+MW-1:0] cx, cy;
  logic [1:0]              qg;
  logic                    vg;
  always_ff @(posedge clk) begin
    if (rst) begin
      cx <= '0; cy <= '0; qg <= '0; vg <= 1'b0;
    end else begin
      cx <= x[ITER] * INVG;
      cy <= y[ITER] * INVG;
      qg <= q[ITER];
      vg <= v[ITER];
    end
  end

  // round from 2^(DW-1+G+DW) scale to Q1.(DW-1), saturate
  function automatic logic signed [DW-1:0] rnd(logic signed [XW+MW-1:0] a);
    logic signed [XW+MW-1:0] r;
    r = (a + ((XW+MW)'(1) <<< (DW + G - 1))) >>> (DW + G);
    if (r > (XW+MW)'(SMAX))      return SMAX;
    else if (r < -(XW+MW)'(SMAX)) return -SMAX;
    else                          return r[DW-1:0];
  endfunction

  logic signed [DW-1:0] c, s, cq, sq;
  always_comb begin
    c = rnd(cx);
    s = rnd(cy);
    unique case (qg)
      2'd0: begin cq =  c; sq =  s; end
      2'd1: begin cq = -s; sq =  c; end
      2'd2: begin cq = -c; sq = -s; end
      default: begin cq =  s; sq = -c; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      w <= '0; out_valid <= 1'b0;
    end else begin
      w         <= '{re: cq, im: -sq};
      out_valid <= vg;
    end
  end
endmodule
