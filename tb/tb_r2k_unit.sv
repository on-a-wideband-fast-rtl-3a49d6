// tb_r2k_unit: one radix-2^k unit used as a complete 64-point FFT
// (LOG2N = K = 6, UNIT = 0). Three frames go in back to back, in bit-reversed
// order: random full-scale noise, a single complex tone, random small values.
// Every output point is compared with the DFT divided by N, computed here in
// floating point, within TOL LSB. The unit must also be gap-free (one pair
// per clock out for one pair per clock in).
module tb_r2k_unit;
  import fft_pkg::*;
  localparam int LOG2N = 6, K = 6, ITER = 20, N = 1 << LOG2N, FR = 3, TOL = 4;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1;
  logic in_valid = 0, out_valid, sat;
  cplx_t in0, in1, out0, out1;
  int checks = 0, failures = 0, maxerr = 0;
  real xr [FR][N], xi [FR][N];

  r2k_unit #(.LOG2N(LOG2N), .K(K), .UNIT(0), .ITER(ITER)) dut (.*);
  always #5 clk = ~clk;

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
    for (int n = 0; n < N; n++) begin
      xr[0][n] = real'(signed'(DW'($urandom)));
      xi[0][n] = real'(signed'(DW'($urandom)));
      xr[1][n] = $floor(60000.0 * $cos(2.0 * PI * 5 * n / N) + 0.5);
      xi[1][n] = $floor(60000.0 * $sin(2.0 * PI * 5 * n / N) + 0.5);
      xr[2][n] = real'($urandom_range(0, 200)) - 100.0;
      xi[2][n] = real'($urandom_range(0, 200)) - 100.0;
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
        for (int f = 0; f < FR; f++)
          for (int t = 0; t < N / 2; t++) begin
            int m [2];
            cplx_t g [2];
            @(posedge clk);
            if (!started) begin
              while (!out_valid) @(posedge clk);
              started = 1;
            end
            checks++;
            if (!out_valid) begin failures++; $display("gap in output stream"); end
            m[0] = int'(pair_pos(64'(t), K)); m[1] = m[0] + N / 2;
            g[0] = out0; g[1] = out1;
            for (int k = 0; k < 2; k++) begin
              real er, ei, a;
              int dr, di;
              er = 0; ei = 0;
              for (int n = 0; n < N; n++) begin
                a = -2.0 * PI * ((n * m[k]) % N) / N;
                er += xr[f][n] * $cos(a) - xi[f][n] * $sin(a);
                ei += xr[f][n] * $sin(a) + xi[f][n] * $cos(a);
              end
              er /= N; ei /= N;
              dr = int'(g[k].re) - int'(er); if (dr < 0) dr = -dr;
              di = int'(g[k].im) - int'(ei); if (di < 0) di = -di;
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
    join
    $display("max error %0d LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
