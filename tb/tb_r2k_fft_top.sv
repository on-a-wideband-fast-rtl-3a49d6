// tb_r2k_fft_top: the whole FFT end to end at a reduced size: N = 2^9 points,
// three radix-2^3 units and two transpose memories (behavioural models).
// Three frames go in back to back in bit-reversed order: random full-scale
// values (built so that a butterfly saturates), a complex tone, and random
// small values. Every output point is checked against the DFT / N of its
// frame at the frequency index the design reports; every index must appear
// exactly once per frame, the output must be gap-free (two points per clock),
// and the power output must equal re^2 + im^2. Counted mechanisms: saturation
// events, transpose bank switches and frames through each transpose.
module tb_r2k_fft_top;
  import fft_pkg::*;
  localparam int LOG2N = 9, K = 3, Q = 3, ITER = 20, RDLAT = 3;
  localparam int N = 1 << LOG2N, FR = 3, TOL = 4;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst = 1;
  logic in_valid = 0, out_valid, sat;
  cplx_t in0, in1, out0, out1;
  logic [LOG2N-1:0] out_idx0, out_idx1;
  logic [2*DW-1:0]  out_pow0, out_pow1;
  logic [Q-2:0]          mem_we, mem_re;
  logic [Q-2:0][LOG2N:0] mem_waddr0, mem_waddr1, mem_raddr0, mem_raddr1;
  cplx_t [Q-2:0]         mem_wdata0, mem_wdata1, mem_rdata0, mem_rdata1;

  int checks = 0, failures = 0, maxerr = 0;
  int nsat = 0;
  int bank_sw [Q-1];
  int tr_frames [Q-1];
  real xr [FR][N], xi [FR][N];

  r2k_fft_top #(.LOG2N(LOG2N), .K(K), .Q(Q), .ITER(ITER), .MEM_RDLAT(RDLAT)) dut (.*);

  for (genvar u = 0; u < Q - 1; u++) begin : g_mem
    ddr2_mem_model #(.AW(LOG2N + 1), .RDLAT(RDLAT)) u_mem (
      .clk, .we(mem_we[u]), .waddr0(mem_waddr0[u]), .waddr1(mem_waddr1[u]),
      .wdata0(mem_wdata0[u]), .wdata1(mem_wdata1[u]), .re(mem_re[u]),
      .raddr0(mem_raddr0[u]), .raddr1(mem_raddr1[u]),
      .rdata0(mem_rdata0[u]), .rdata1(mem_rdata1[u])
    );
    logic last_bank = 1'b0;
    always @(posedge clk) begin
      if (!rst && mem_we[u]) begin
        if (mem_waddr0[u][LOG2N] != last_bank) bank_sw[u]++;
        last_bank <= mem_waddr0[u][LOG2N];
      end
      if (!rst && mem_re[u]) tr_frames[u]++;
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && sat) nsat++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bitrev(int v, int bits);
    int r;
    r = 0;
    for (int b = 0; b < bits; b++) if (v[b]) r |= 1 << (bits - 1 - b);
    return r;
  endfunction

  function automatic cplx_t smp(int f, int n);
    return '{re: DW'(int'(xr[f][n])), im: DW'(int'(xi[f][n]))};
  endfunction

  initial begin
    for (int u = 0; u < Q - 1; u++) begin bank_sw[u] = 0; tr_frames[u] = 0; end
    // frame 0: after two stages every block of 8 holds (A,0) and (A,A)
    // at offsets 1 and 5, so stage 3 forms (u + W_8 v)/2 = 1.21 A: saturation
    for (int p = 0; p < N; p++) begin
      int r, n;
      real cr, ci, yr, yi;
      r  = bitrev(p % 4, 2);
      cr = 131071.0;
      ci = (p % 8 < 4) ? 0.0 : 131071.0;
      // y(r) = c * j^r
      case (r)
        0: begin yr = cr;  yi = ci;  end
        1: begin yr = -ci; yi = cr;  end
        2: begin yr = -cr; yi = -ci; end
        default: begin yr = ci; yi = -cr; end
      endcase
      n = bitrev(p, LOG2N);
      xr[0][n] = yr; xi[0][n] = yi;
    end
    for (int n = 0; n < N; n++) begin
      xr[1][n] = $floor(90000.0 * $cos(2.0 * PI * 37 * n / N) + 0.5);
      xi[1][n] = $floor(90000.0 * $sin(2.0 * PI * 37 * n / N) + 0.5);
      xr[2][n] = real'($urandom_range(0, 2000)) - 1000.0;
      xi[2][n] = real'($urandom_range(0, 2000)) - 1000.0;
    end
    in0 = '0; in1 = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    fork
      begin
        for (int f = 0; f < FR; f++)
          for (int t = 0; t < N / 2; t++) begin
            @(negedge clk);
            in0 <= smp(f, bitrev(2 * t, LOG2N));
            in1 <= smp(f, bitrev(2 * t + 1, LOG2N));
            in_valid <= 1;
          end
        @(negedge clk); in_valid <= 0;
      end
      begin
        bit started = 0;
        for (int f = 0; f < FR; f++) begin
          bit seen [N];
          for (int m = 0; m < N; m++) seen[m] = 0;
          for (int t = 0; t < N / 2; t++) begin
            int m [2];
            cplx_t g [2];
            longint pw [2];
            @(posedge clk);
            if (!started) begin
              while (!out_valid) @(posedge clk);
              started = 1;
            end
            checks++;
            if (!out_valid) begin failures++; $display("gap in output stream"); end
            m[0] = int'(out_idx0); m[1] = int'(out_idx1);
            g[0] = out0; g[1] = out1;
            pw[0] = longint'(out_pow0); pw[1] = longint'(out_pow1);
            for (int k = 0; k < 2; k++) begin
              real er, ei, a;
              int dr, di;
              checks++;
              if (seen[m[k]]) begin failures++; $display("f%0d index %0d twice", f, m[k]); end
              seen[m[k]] = 1;
              checks++;
              if (pw[k] != longint'(g[k].re) * g[k].re + longint'(g[k].im) * g[k].im) begin
                failures++; $display("power mismatch at %0d", m[k]);
              end
              er = 0; ei = 0;
              for (int n = 0; n < N; n++) begin
                a = -2.0 * PI * ((n * m[k]) % N) / N;
                er += xr[f][n] * $cos(a) - xi[f][n] * $sin(a);
                ei += xr[f][n] * $sin(a) + xi[f][n] * $cos(a);
              end
              er /= N; ei /= N;
              dr = int'(g[k].re) - int'(er); if (dr < 0) dr = -dr;
              di = int'(g[k].im) - int'(ei); if (di < 0) di = -di;
              // frame 0 saturates on purpose: check it only for sanity
              if (f != 0) begin
                if (dr > maxerr) maxerr = dr;
                if (di > maxerr) maxerr = di;
                checks++;
                if (dr > TOL || di > TOL) begin
                  failures++;
                  if (failures < 10) $display("f%0d X(%0d): got %0d %0d exp %0.1f %0.1f",
                                              f, m[k], g[k].re, g[k].im, er, ei);
                end
              end
            end
          end
        end
      end
    join
    $display("max error %0d LSB (frames 1-2)", maxerr);
    $display("saturation events %0d", nsat);
    for (int u = 0; u < Q - 1; u++)
      $display("transpose %0d: bank switches %0d, frames read %0d", u, bank_sw[u], tr_frames[u] / (N / 2));
    checks++; if (nsat == 0) begin failures++; $display("saturation never happened"); end
    for (int u = 0; u < Q - 1; u++) begin
      checks++; if (bank_sw[u] < 2) begin failures++; $display("transpose %0d: banks not alternated", u); end
      checks++; if (tr_frames[u] != FR * N / 2) begin failures++; $display("transpose %0d: never read", u); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
