// tb_fft_tone_workload: the wideband FFT at 2^21 points (three radix-2^7
// units, two transposes with memory models, default CORDIC depth ITER =
// log2 N) on spectrometer-like input: a single complex tone, then two tones
// of different strength. The expected spectrum is known in closed form
// (X(m)/N = tone amplitude at the tone bins, 0 elsewhere), so all 2^21 bins
// of each frame are checked, as well as the index coverage and the gap-free
// two-points-per-clock output.
module tb_fft_tone_workload;
  import fft_pkg::*;
  localparam int LOG2N = 21, K = 7, Q = 3, RDLAT = 4;
  localparam int N = 1 << LOG2N, FR = 2, TOL = 6;
  localparam real PI = 3.14159265358979323846;
  localparam int F0 = 12345, F1 = 777, F2 = 200000;
  localparam real A0 = 100000.0, A1 = 60000.0, A2 = 40000.0;

  logic clk = 0, rst = 1;
  logic in_valid = 0, out_valid, sat;
  cplx_t in0, in1, out0, out1;
  logic [LOG2N-1:0] out_idx0, out_idx1;
  logic [2*DW-1:0]  out_pow0, out_pow1;
  logic [Q-2:0]          mem_we, mem_re;
  logic [Q-2:0][LOG2N:0] mem_waddr0, mem_waddr1, mem_raddr0, mem_raddr1;
  cplx_t [Q-2:0]         mem_wdata0, mem_wdata1, mem_rdata0, mem_rdata1;

  int checks = 0, failures = 0, maxerr = 0, nsat = 0;
  bit seen [N];

  r2k_fft_top #(.LOG2N(LOG2N), .K(K), .Q(Q), .MEM_RDLAT(RDLAT)) dut (.*);

  for (genvar u = 0; u < Q - 1; u++) begin : g_mem
    ddr2_mem_model #(.AW(LOG2N + 1), .RDLAT(RDLAT)) u_mem (
      .clk, .we(mem_we[u]), .waddr0(mem_waddr0[u]), .waddr1(mem_waddr1[u]),
      .wdata0(mem_wdata0[u]), .wdata1(mem_wdata1[u]), .re(mem_re[u]),
      .raddr0(mem_raddr0[u]), .raddr1(mem_raddr1[u]),
      .rdata0(mem_rdata0[u]), .rdata1(mem_rdata1[u])
    );
  end

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && sat) nsat++;

  initial begin
    repeat (6 * N) @(posedge clk);
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

  // tone sum at sample n of frame f
  function automatic cplx_t smp(int f, int n);
    real re, im, a;
    longint nn;
    nn = n;
    re = 0; im = 0;
    if (f == 0) begin
      a = 2.0 * PI * ((nn * F0) % N) / N;
      re = A0 * $cos(a); im = A0 * $sin(a);
    end else begin
      a = 2.0 * PI * ((nn * F1) % N) / N;
      re = A1 * $cos(a); im = A1 * $sin(a);
      a = 2.0 * PI * ((nn * F2) % N) / N;
      re += A2 * $cos(a); im += A2 * $sin(a);
    end
    return '{re: DW'(int'($floor(re + 0.5))), im: DW'(int'($floor(im + 0.5)))};
  endfunction

  function automatic real expect_re(int f, int m);
    if (f == 0) return (m == F0) ? A0 : 0.0;
    if (m == F1) return A1;
    if (m == F2) return A2;
    return 0.0;
  endfunction

  initial begin
    in0 = '0; in1 = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    fork
      begin
        for (int f = 0; f < FR; f++)
          for (int t = 0; t < N / 2; t++) begin
            cplx_t a, b;
            a = smp(f, bitrev(2 * t, LOG2N));
            b = smp(f, bitrev(2 * t + 1, LOG2N));
            @(negedge clk);
            in0 <= a; in1 <= b; in_valid <= 1;
          end
        @(negedge clk); in_valid <= 0;
      end
      begin
        bit started = 0;
        for (int f = 0; f < FR; f++) begin
          for (int m = 0; m < N; m++) seen[m] = 0;
          for (int t = 0; t < N / 2; t++) begin
            int m [2];
            cplx_t g [2];
            @(posedge clk);
            if (!started) begin
              while (!out_valid) @(posedge clk);
              started = 1;
            end
            checks++;
            if (!out_valid) begin failures++; if (failures < 10) $display("gap in output"); end
            m[0] = int'(out_idx0); m[1] = int'(out_idx1);
            g[0] = out0; g[1] = out1;
            for (int k = 0; k < 2; k++) begin
              int dr, di;
              checks++;
              if (seen[m[k]]) begin failures++; if (failures < 10) $display("index %0d twice", m[k]); end
              seen[m[k]] = 1;
              dr = int'(g[k].re) - int'(expect_re(f, m[k])); if (dr < 0) dr = -dr;
              di = int'(g[k].im); if (di < 0) di = -di;
              if (dr > maxerr) maxerr = dr;
              if (di > maxerr) maxerr = di;
              checks++;
              if (dr > TOL || di > TOL) begin
                failures++;
                if (failures < 10) $display("f%0d X(%0d) = %0d %0d", f, m[k], g[k].re, g[k].im);
              end
            end
          end
        end
      end
    join
    $display("max error %0d LSB, saturations %0d", maxerr, nsat);
    checks++; if (nsat != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
