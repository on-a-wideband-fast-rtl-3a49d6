// tb_cplx_addsub: random samples and products (including products large
// enough to saturate) through cplx_addsub; the halved, rounded and saturated
// sum and difference are recomputed with 64-bit integers.
module tb_cplx_addsub;
  import fft_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid = 0, out_valid, sat;
  cplx_t u, x0, x1;
  logic signed [2*DW:0] pr, pi;
  int checks = 0, failures = 0, nsat = 0;
  longint e [$];
  bit     es [$];
  int lat = -1, cyc = 0, tin = -1;

  cplx_addsub dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && tin < 0) tin <= cyc;
    if (!rst && out_valid && lat < 0) lat <= cyc - tin;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: round half up of v / 2^DW, then saturate; returns value, flags
  function automatic longint rs(longint v, ref bit s);
    longint r;
    r = (v + (longint'(1) << (DW - 1))) >>> DW;
    if (r > longint'(SMAX)) begin r = longint'(SMAX); s = 1; end
    if (r < longint'(SMIN)) begin r = longint'(SMIN); s = 1; end
    return r;
  endfunction

  function automatic longint rprod();
    longint m;
    m = longint'(signed'(DW'($urandom))) * longint'(signed'(DW'($urandom)));
    if ($urandom_range(0, 3) == 0) m = m * 2;      // up to sqrt(2)-size products
    return m;
  endfunction

  initial begin
    u = '0; pr = '0; pi = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    fork
      begin
        for (int n = 0; n < 5000; n++) begin
          cplx_t tu; longint a, b; bit s;
          tu = '{re: DW'($urandom), im: DW'($urandom)};
          a = rprod(); b = rprod();
          s = 0;
          e.push_back(rs((longint'(tu.re) <<< (DW - 1)) + a, s));
          e.push_back(rs((longint'(tu.im) <<< (DW - 1)) + b, s));
          e.push_back(rs((longint'(tu.re) <<< (DW - 1)) - a, s));
          e.push_back(rs((longint'(tu.im) <<< (DW - 1)) - b, s));
          es.push_back(s);
          @(posedge clk);
          u <= tu; pr <= (2*DW+1)'(a); pi <= (2*DW+1)'(b); in_valid <= 1;
        end
        @(posedge clk); in_valid <= 0;
      end
      begin
        int got = 0;
        while (got < 5000) begin
          @(posedge clk);
          if (out_valid) begin
            longint g [4]; bit s;
            g = '{longint'(x0.re), longint'(x0.im), longint'(x1.re), longint'(x1.im)};
            for (int k = 0; k < 4; k++) begin
              longint x; x = e.pop_front();
              checks++;
              if (g[k] != x) begin
                failures++;
                if (failures < 10) $display("mismatch %0d.%0d: got %0d exp %0d", got, k, g[k], x);
              end
            end
            s = es.pop_front();
            checks++;
            if (sat != s) failures++;
            if (s) nsat++;
            got++;
          end
        end
      end
    join
    checks++; if (lat != 1) begin failures++; $display("latency %0d", lat); end
    checks++; if (nsat == 0) begin failures++; $display("saturation never exercised"); end
    $display("saturations seen: %0d", nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
