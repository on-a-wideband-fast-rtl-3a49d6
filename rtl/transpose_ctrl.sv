// transpose_ctrl: transpose-memory controller between two radix-2^k units.
//
// Between units the stream index is rotated by K bits so that the pairs the
// next unit joins become adjacent. The controller writes every point of a frame
// into an external memory at its stream position, and reads the frame back
// with output position o taken from address rotl(o, K) (a K x (LOG2N-K) matrix
// transpose). The memory is ping-pong: two banks of N points selected by the
// top address bit; frame f is written to bank f mod 2 while frame f-1 is read
// from the other bank, so a gap-free input stream gives a gap-free output
// stream one frame (N/2 clocks) later.
// Write side: the input pairs come from a unit's last stage, pair t holding
// positions pair_pos(t, K) and pair_pos(t, K) + 2^(K-1); two points are written
// per clock (two write ports). Read side: two points per clock (positions 2t
// and 2t+1), data back RDLAT clocks after the request, fixed latency.
// The memory itself (two off-chip DDR2 channels behind a vendor controller in
// the reference system) is outside this module; its ports are brought out.
// The write-data ports carry the input words unchanged and mem_we is in_valid:
// the controller's work is in the addresses, the bank sequencing and the
// read-data timing.
// Timing: first output pair RDLAT + 1 clocks after the last pair of a frame
// was written; then one pair per clock for N/2 clocks.
module transpose_ctrl
  import fft_pkg::*;
#(
  parameter int LOG2N = 30,
  parameter int K     = 10,
  parameter int RDLAT = 4
) (
  input  logic             clk,
  input  logic             rst,
  // stream in
  input  logic             in_valid,
  input  cplx_t            in0,
  input  cplx_t            in1,
  // stream out
  output logic             out_valid,
  output cplx_t            out0,
  output cplx_t            out1,
  // external memory, two points per clock each way
  output logic             mem_we,
  output logic [LOG2N:0]   mem_waddr0,
  output logic [LOG2N:0]   mem_waddr1,
  output cplx_t            mem_wdata0,
  output cplx_t            mem_wdata1,
  output logic             mem_re,
  output logic [LOG2N:0]   mem_raddr0,
  output logic [LOG2N:0]   mem_raddr1,
  input  cplx_t            mem_rdata0,
  input  cplx_t            mem_rdata1
);
  localparam int TW = LOG2N - 1;

  logic [TW-1:0] wcnt, rcnt;
  logic          wbank, rbank, rd_active, frame_done;
  logic [RDLAT:0] vpipe;

  assign frame_done = in_valid && (wcnt == '1);

  always_ff @(posedge clk) begin
    if (rst) begin
      wcnt <= '0; wbank <= 1'b0;
    end else if (in_valid) begin
      wcnt <= wcnt + 1'b1;
      if (frame_done) wbank <= ~wbank;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_active <= 1'b0; rbank <= 1'b0; rcnt <= '0;
    end else if (frame_done) begin
      rd_active <= 1'b1; rbank <= wbank; rcnt <= '0;
    end else if (rd_active) begin
      rcnt <= rcnt + 1'b1;
      if (rcnt == '1) rd_active <= 1'b0;
    end
  end

  always_comb begin
    logic [63:0] p0, o0;
    p0         = pair_pos(64'(wcnt), K);
    mem_we     = in_valid;
    mem_waddr0 = {wbank, LOG2N'(p0)};
    mem_waddr1 = {wbank, LOG2N'(p0 | (64'd1 << (K - 1)))};
    mem_wdata0 = in0;
    mem_wdata1 = in1;
    o0         = 64'({rcnt, 1'b0});
    mem_re     = rd_active;
    mem_raddr0 = {rbank, LOG2N'(rotl(o0, LOG2N, K))};
    mem_raddr1 = {rbank, LOG2N'(rotl(o0 | 64'd1, LOG2N, K))};
  end

  // read data returns RDLAT clocks after the request; one output register
  always_ff @(posedge clk) begin
    if (rst) begin
      vpipe <= '0; out_valid <= 1'b0; out0 <= '0; out1 <= '0;
    end else begin
      vpipe     <= {vpipe[RDLAT-1:0], rd_active};
      out_valid <= vpipe[RDLAT-1];
      out0      <= mem_rdata0;
      out1      <= mem_rdata1;
    end
  end

  // a new frame may only complete when the previous one has been read out
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
    frame_done |-> (!rd_active || rcnt == '1));
endmodule
