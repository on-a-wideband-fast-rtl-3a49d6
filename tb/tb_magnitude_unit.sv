// tb_magnitude_unit: random and extreme samples through magnitude_unit; the
// power re^2 + im^2 is recomputed with 64-bit integers; latency must be 2.
module tb_magnitude_unit;
  import fft_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid = 0, out_valid;
  cplx_t x0, x1;
  logic [2*DW-1:0] p0, p1;
  int checks = 0, failures = 0;
  longint e [$];
  int lat = -1, cyc = 0, tin = -1;

  magnitude_unit dut (.*);
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

  function automatic cplx_t rc(int n);
    if (n == 0) return '{re: SMIN, im: SMIN};
    if (n == 1) return '{re: SMAX, im: SMIN};
    return '{re: DW'($urandom), im: DW'($urandom)};
  endfunction

  initial begin
    x0 = '0; x1 = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    fork
      begin
        for (int n = 0; n < 3000; n++) begin
          cplx_t a, b;
          a = rc(n); b = rc(n + 1);
          e.push_back(longint'(a.re) * a.re + longint'(a.im) * a.im);
          e.push_back(longint'(b.re) * b.re + longint'(b.im) * b.im);
          @(negedge clk);
          x0 <= a; x1 <= b; in_valid <= 1;
        end
        @(negedge clk);
        in_valid <= 0;
      end
      begin
        int got = 0;
        while (got < 3000) begin
          @(posedge clk);
          if (out_valid) begin
            longint a, b;
            a = e.pop_front(); b = e.pop_front();
            checks++;
            if (longint'(p0) != a || longint'(p1) != b) begin
              failures++;
              if (failures < 10) $display("mismatch %0d: got %0d %0d exp %0d %0d", got, p0, p1, a, b);
            end
            got++;
          end
        end
      end
    join
    checks++; if (lat != 2) begin failures++; $display("latency %0d", lat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
