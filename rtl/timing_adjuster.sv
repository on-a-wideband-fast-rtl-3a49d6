// timing_adjuster: delay commutator between two radix-2 stages.
//
// A stage whose butterflies join points at distance 2D needs both points of a
// pair at the same time, while the previous stage delivers pairs at distance D
// (two lanes, one pair per clock, pairs in block order). Over a group of 2D
// input pairs the lane-1 words of the first D pairs must be exchanged with the
// lane-0 words of the last D pairs. This is done with D words of delay on
// lane 1, a two-way switch that crosses the lanes during the second half of
// each group (bit log2(D) of the input pair count), and D words of delay on
// lane 0 after the switch. 2D registers per lane pair, one switch.
// The stream is assumed gap-free within a frame; the pair count advances on
// in_valid, the delays shift every clock, so the tail of a frame drains by
// itself. Timing: latency D + 1 (the outputs are registered).
module timing_adjuster
  import fft_pkg::*;
#(
  parameter int D  = 1,       // half the new pair distance (power of two)
  parameter int CNTW = 8      // width of the pair counter (>= log2(D) + 1)
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  cplx_t in0,
  input  cplx_t in1,
  output logic  out_valid,
  output cplx_t out0,
  output cplx_t out1
);
  localparam int LD = $clog2(D);

  logic [CNTW-1:0] cnt;
  cplx_t           l1d, a0, a1, a0d;
  logic            vd, swap;

  always_ff @(posedge clk) begin
    if (rst)           cnt <= '0;
    else if (in_valid) cnt <= cnt + 1'b1;
  end

  delay_line #(.W(2*DW), .D(D)) u_d1 (.clk, .rst, .din(in1), .dout(l1d));
  delay_line #(.W(1),    .D(D)) u_dv (.clk, .rst, .din(in_valid), .dout(vd));

  assign swap = cnt[LD];
  assign a0   = swap ? l1d : in0;
  assign a1   = swap ? in0 : l1d;

  delay_line #(.W(2*DW), .D(D)) u_d0 (.clk, .rst, .din(a0), .dout(a0d));

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; out0 <= '0; out1 <= '0;
    end else begin
      out_valid <= vd;
      out0      <= a0d;
      out1      <= a1;
    end
  end
endmodule
