// tb_cplx_mult: random operands and edge values through cplx_mult; the
// product is recomputed with 64-bit integers and compared two clocks later.
module tb_cplx_mult;
  import fft_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid = 0, out_valid;
  cplx_t a, w;
  logic signed [2*DW:0] pr, pi;
  int checks = 0, failures = 0;
  longint er [$], ei [$];

  cplx_mult dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [DW-1:0] rnd18();
    int r;
    r = int'($urandom_range(0, 9));
    if (r == 0) return SMIN;
    if (r == 1) return SMAX;
    return DW'($urandom);
  endfunction

  int lat = -1, cyc = 0, tin = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && tin < 0) tin <= cyc;
    if (!rst && out_valid && lat < 0) lat <= cyc - tin;
  end
  initial begin
    a = '0; w = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // latency: single pulse, measured by the sampling process below
    @(posedge clk);
    a <= '{re: 18'sd3, im: -18'sd2}; w <= '{re: 18'sd5, im: 18'sd7}; in_valid <= 1;
    @(posedge clk); in_valid <= 0;
    repeat (4) @(posedge clk);
    checks++; if (lat != 2) begin failures++; $display("latency %0d", lat); end
    checks++; if (pr != 3*5 - (-2)*7 || pi != 3*7 + (-2)*5) begin failures++; $display("small product wrong"); end
    // random stream
    fork
      begin
        for (int n = 0; n < 5000; n++) begin
          cplx_t ta, tw;
          ta = '{re: rnd18(), im: rnd18()}; tw = '{re: rnd18(), im: rnd18()};
          @(posedge clk);
          a <= ta; w <= tw; in_valid <= 1;
          er.push_back(longint'(ta.re) * longint'(tw.re) - longint'(ta.im) * longint'(tw.im));
          ei.push_back(longint'(ta.re) * longint'(tw.im) + longint'(ta.im) * longint'(tw.re));
        end
        @(posedge clk); in_valid <= 0;
      end
      begin
        int got = 0;
        while (got < 5000) begin
          @(posedge clk);
          if (out_valid) begin
            longint xr, xi;
            xr = er.pop_front(); xi = ei.pop_front();
            checks++;
            if (longint'(pr) != xr || longint'(pi) != xi) begin
              failures++;
              if (failures < 10) $display("mismatch %0d: got %0d %0d exp %0d %0d", got, pr, pi, xr, xi);
            end
            got++;
          end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
