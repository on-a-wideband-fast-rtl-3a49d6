// tb_butterfly: random u, v and twiddle w through the butterfly; the
// expected X0 = (u + w v)/2 and X1 = (u - w v)/2 are recomputed exactly with
// 64-bit integers, rounded half up and saturated. Latency must be 3.
module tb_butterfly;
  import fft_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid = 0, out_valid, sat;
  cplx_t u, v, w, x0, x1;
  int checks = 0, failures = 0, nsat = 0;
  longint e [$];
  int lat = -1, cyc = 0, tin = -1;

  butterfly dut (.*);
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

  function automatic longint rs(longint val);
    longint r;
    r = (val + (longint'(1) << (DW - 1))) >>> DW;
    if (r > longint'(SMAX)) r = longint'(SMAX);
    if (r < longint'(SMIN)) r = longint'(SMIN);
    return r;
  endfunction

  initial begin
    u = '0; v = '0; w = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    fork
      begin
        for (int n = 0; n < 5000; n++) begin
          cplx_t tu, tv, tw; longint pr, pi;
          tu = '{re: DW'($urandom), im: DW'($urandom)};
          tv = '{re: DW'($urandom), im: DW'($urandom)};
          tw = '{re: DW'($urandom), im: DW'($urandom)};
          pr = longint'(tv.re) * tw.re - longint'(tv.im) * tw.im;
          pi = longint'(tv.re) * tw.im + longint'(tv.im) * tw.re;
          e.push_back(rs((longint'(tu.re) <<< (DW - 1)) + pr));
          e.push_back(rs((longint'(tu.im) <<< (DW - 1)) + pi));
          e.push_back(rs((longint'(tu.re) <<< (DW - 1)) - pr));
          e.push_back(rs((longint'(tu.im) <<< (DW - 1)) - pi));
          @(negedge clk);
          u <= tu; v <= tv; w <= tw; in_valid <= 1;
        end
        @(negedge clk); in_valid <= 0;
      end
      begin
        int got = 0;
        while (got < 5000) begin
          @(posedge clk);
          if (out_valid) begin
            longint g [4];
            g = '{longint'(x0.re), longint'(x0.im), longint'(x1.re), longint'(x1.im)};
            for (int k = 0; k < 4; k++) begin
              longint x; x = e.pop_front();
              checks++;
              if (g[k] != x) begin
                failures++;
                if (failures < 10) $display("mismatch %0d.%0d: got %0d exp %0d", got, k, g[k], x);
              end
            end
            if (sat) nsat++;
            got++;
          end
        end
      end
    join
    checks++; if (lat != 3) begin failures++; $display("latency %0d", lat); end
    checks++; if (nsat == 0) begin failures++; $display("no saturation seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
