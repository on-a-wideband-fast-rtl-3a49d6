// r2k_fft_top: wideband N-point FFT built from radix-2^k units and transposes.
//
// N = 2^LOG2N points, LOG2N = Q*K. Q radix-2^k butterfly units each perform K
// of the LOG2N radix-2 decimation-in-time stages; between two units a transpose
// memory rotates the stream index by K bits so that the next unit again joins
// adjacent points. Twiddle factors come from pipelined CORDICs, so no twiddle
// memory is needed; the Q-1 transpose memories are external (one DDR2 channel
// each in the reference system) and their ports are brought out.
// Defaults: 2^30 points, K = 10, three units, two transposes.
// Input: in0/in1 = two points per clock in bit-reversed order (pair t holds
// x(bitrev(2t)) and x(bitrev(2t+1))), frames of N/2 pairs back to back.
// Output: two spectrum points per clock, X(m)/N (each stage halves), with
// their frequency indices out_idx0/out_idx1 (the output is not in natural
// order; the receiver sorts it), and the power |X(m)/N|^2 of each.
// sat pulses when a butterfly saturated. Latency: about Q-1 frames plus the
// pipeline depth of the units.
module r2k_fft_top
  import fft_pkg::*;
#(
  parameter int LOG2N     = 30,
  parameter int K         = 10,
  parameter int Q         = 3,
  parameter int ITER      = LOG2N,
  parameter int MEM_RDLAT = 4
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  cplx_t                  in0,
  input  cplx_t                  in1,
  output logic                   out_valid,
  output cplx_t                  out0,
  output cplx_t                  out1,
  output logic [LOG2N-1:0]       out_idx0,
  output logic [LOG2N-1:0]       out_idx1,
  output logic [2*DW-1:0]        out_pow0,
  output logic [2*DW-1:0]        out_pow1,
  output logic                   sat,
  // transpose memories, one per unit boundary
  output logic [Q-2:0]           mem_we,
  output logic [Q-2:0][LOG2N:0]  mem_waddr0,
  output logic [Q-2:0][LOG2N:0]  mem_waddr1,
  output cplx_t [Q-2:0]          mem_wdata0,
  output cplx_t [Q-2:0]          mem_wdata1,
  output logic [Q-2:0]           mem_re,
  output logic [Q-2:0][LOG2N:0]  mem_raddr0,
  output logic [Q-2:0][LOG2N:0]  mem_raddr1,
  input  cplx_t [Q-2:0]          mem_rdata0,
  input  cplx_t [Q-2:0]          mem_rdata1
);
  // unit inputs/outputs
  logic  uiv [Q];
  cplx_t ui0 [Q];
  cplx_t ui1 [Q];
  logic  uov [Q];
  cplx_t uo0 [Q];
  cplx_t uo1 [Q];
  logic [Q-1:0] usat;

  assign uiv[0] = in_valid;
  assign ui0[0] = in0;
  assign ui1[0] = in1;

  for (genvar u = 0; u < Q; u++) begin : g_unit
    r2k_unit #(.LOG2N(LOG2N), .K(K), .UNIT(u), .ITER(ITER)) u_unit (
      .clk, .rst, .in_valid(uiv[u]), .in0(ui0[u]), .in1(ui1[u]),
      .out_valid(uov[u]), .out0(uo0[u]), .out1(uo1[u]), .sat(usat[u])
    );
    if (u < Q - 1) begin : g_tr
      transpose_ctrl #(.LOG2N(LOG2N), .K(K), .RDLAT(MEM_RDLAT)) u_tr (
        .clk, .rst,
        .in_valid(uov[u]), .in0(uo0[u]), .in1(uo1[u]),
        .out_valid(uiv[u+1]), .out0(ui0[u+1]), .out1(ui1[u+1]),
        .mem_we(mem_we[u]), .mem_waddr0(mem_waddr0[u]), .mem_waddr1(mem_waddr1[u]),
        .mem_wdata0(mem_wdata0[u]), .mem_wdata1(mem_wdata1[u]),
        .mem_re(mem_re[u]), .mem_raddr0(mem_raddr0[u]), .mem_raddr1(mem_raddr1[u]),
        .mem_rdata0(mem_rdata0[u]), .mem_rdata1(mem_rdata1[u])
      );
    end
  end

  // frequency index of each output point: stream position of the last unit,
  // rotated back by the (Q-1)*K bits the transposes rotated it
  logic [LOG2N-2:0] ocnt;
  logic [LOG2N-1:0] idx0, idx1;
  always_ff @(posedge clk) begin
    if (rst)             ocnt <= '0;
    else if (uov[Q-1])   ocnt <= ocnt + 1'b1;
  end
  always_comb begin
    logic [63:0] p0;
    p0   = pair_pos(64'(ocnt), K);
    idx0 = LOG2N'(rotl(p0, LOG2N, (Q - 1) * K));
    idx1 = LOG2N'(rotl(p0 | (64'd1 << (K - 1)), LOG2N, (Q - 1) * K));
  end

  // power spectrum, with the data and indices delayed to match
  logic pv;
  magnitude_unit u_mag (
    .clk, .rst, .in_valid(uov[Q-1]), .x0(uo0[Q-1]), .x1(uo1[Q-1]),
    .out_valid(pv), .p0(out_pow0), .p1(out_pow1)
  );
  delay_line #(.W(4*DW + 2*LOG2N), .D(2)) u_dly (
    .clk, .rst,
    .din({uo0[Q-1], uo1[Q-1], idx0, idx1}),
    .dout({out0, out1, out_idx0, out_idx1})
  );
  assign out_valid = pv;
  assign sat       = |usat;

  initial begin
    assert (LOG2N == Q * K && Q >= 2 && K >= 2)
      else $error("r2k_fft_top: needs LOG2N == Q*K, Q >= 2, K >= 2");
  end
endmodule
