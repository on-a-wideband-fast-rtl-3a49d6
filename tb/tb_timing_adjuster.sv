// tb_timing_adjuster: streams three back-to-back frames of tagged points
// (real part = position, imaginary part = frame) into a delay commutator with
// D = 4, in the order a stage joining points at distance D produces them, and
// checks that every output pair holds the two points at distance 2D in the
// order the next stage needs (fft_pkg::pair_pos). Latency must be D + 1.
module tb_timing_adjuster;
  import fft_pkg::*;
  localparam int D = 4, LD = 2, NP = 64, FR = 3;
  logic clk = 0, rst = 1;
  logic in_valid = 0, out_valid;
  cplx_t in0, in1, out0, out1;
  int checks = 0, failures = 0;
  int lat = -1, cyc = 0, tin = -1;

  timing_adjuster #(.D(D), .CNTW(8)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && tin < 0) tin <= cyc;
    if (!rst && out_valid && lat < 0) lat <= cyc - tin;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cplx_t tag(longint pos, int f);
    return '{re: DW'(pos), im: DW'(f)};
  endfunction

  initial begin
    in0 = '0; in1 = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    fork
      begin
        for (int f = 0; f < FR; f++)
          for (int t = 0; t < NP / 2; t++) begin
            longint p;
            p = longint'(pair_pos(64'(t), LD + 1));
            @(negedge clk);
            in0 <= tag(p, f); in1 <= tag(p + D, f); in_valid <= 1;
          end
        @(negedge clk); in_valid <= 0;
      end
      begin
        for (int f = 0; f < FR; f++)
          for (int t = 0; t < NP / 2; t++) begin
            longint p;
            @(posedge clk);
            while (!out_valid) @(posedge clk);
            p = longint'(pair_pos(64'(t), LD + 2));
            checks++;
            if (out0 != tag(p, f) || out1 != tag(p + 2 * D, f)) begin
              failures++;
              if (failures < 10)
                $display("f%0d t%0d: got %0d/%0d %0d/%0d exp %0d %0d", f, t,
                         out0.re, out0.im, out1.re, out1.im, p, p + 2 * D);
            end
          end
      end
    join
    checks++; if (lat != D + 1) begin failures++; $display("latency %0d", lat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
