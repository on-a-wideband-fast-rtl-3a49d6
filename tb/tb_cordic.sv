// tb_cordic: phases through the pipelined CORDIC; each twiddle is compared
// with round(2^17 cos(theta)) and -round(2^17 sin(theta)) from the simulator's
// real math, within a small tolerance. Covers all four quadrants, the exact
// multiples of pi/4, and random phases; latency must be ITER + 3. A second
// instance at the default size (30-bit phase, 30 stages) gets random phases.
module tb_cordic;
  import fft_pkg::*;
  localparam int PW = 16, ITER = 20, TOL = 3;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1;
  logic in_valid = 0, out_valid;
  logic [PW-1:0] phase;
  cplx_t w;
  int checks = 0, failures = 0, maxerr = 0;
  int ph [$];
  int lat = -1, cyc = 0, tin = -1;

  cordic #(.PW(PW), .ITER(ITER)) dut (.*);

  // second instance at the default size (30-bit phase, 30 stages)
  localparam int PWD = 30;
  logic [PWD-1:0] phase_d;
  logic           vd_out;
  cplx_t          w_d;
  longint         ph_d [$];
  int             maxerr_d = 0, got_d = 0;
  cordic dut_d (.clk, .rst, .in_valid, .phase(phase_d), .out_valid(vd_out), .w(w_d));
  always @(posedge clk) begin
    if (!rst && vd_out && ph_d.size() > 0) begin
      longint p; real th; int ec, es, dc, ds;
      p  = ph_d.pop_front();
      th = 2.0 * PI * real'(p) / (2.0 ** PWD);
      ec = clip($cos(th) * (2.0 ** (DW - 1)));
      es = clip(-$sin(th) * (2.0 ** (DW - 1)));
      dc = int'(w_d.re) - ec; if (dc < 0) dc = -dc;
      ds = int'(w_d.im) - es; if (ds < 0) ds = -ds;
      if (dc > maxerr_d) maxerr_d = dc;
      if (ds > maxerr_d) maxerr_d = ds;
      checks++;
      got_d++;
      if (dc > TOL || ds > TOL) begin
        failures++;
        if (failures < 10) $display("30-bit phase %0d: got %0d %0d exp %0d %0d", p, w_d.re, w_d.im, ec, es);
      end
    end
  end
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

  function automatic int clip(real r);
    int i;
    i = int'(r);
    if (i > int'(SMAX)) i = int'(SMAX);
    if (i < -int'(SMAX)) i = -int'(SMAX);
    return i;
  endfunction

  initial begin
    phase = '0; phase_d = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    fork
      begin
        for (int n = 0; n < 4000; n++) begin
          int p;
          longint pd;
          p = (n < 8) ? n * (1 << (PW - 3)) : int'($urandom_range(0, (1 << PW) - 1));
          pd = (longint'($urandom) << 14) ^ longint'($urandom);
          pd = pd & ((longint'(1) << PWD) - 1);
          ph.push_back(p);
          ph_d.push_back(pd);
          @(negedge clk);
          phase <= PW'(p); phase_d <= PWD'(pd); in_valid <= 1;
        end
        @(negedge clk); in_valid <= 0;
      end
      begin
        int got = 0;
        while (got < 4000) begin
          @(posedge clk);
          if (out_valid) begin
            int p, ec, es, dc, ds;
            real th;
            p  = ph.pop_front();
            th = 2.0 * PI * p / (2.0 ** PW);
            ec = clip($cos(th) * (2.0 ** (DW - 1)));
            es = clip(-$sin(th) * (2.0 ** (DW - 1)));
            dc = int'(w.re) - ec; if (dc < 0) dc = -dc;
            ds = int'(w.im) - es; if (ds < 0) ds = -ds;
            if (dc > maxerr) maxerr = dc;
            if (ds > maxerr) maxerr = ds;
            checks++;
            if (dc > TOL || ds > TOL) begin
              failures++;
              if (failures < 10) $display("phase %0d: got %0d %0d exp %0d %0d", p, w.re, w.im, ec, es);
            end
            got++;
          end
        end
      end
    join
    checks++; if (lat != ITER + 3) begin failures++; $display("latency %0d", lat); end
    repeat (40) @(posedge clk);
    checks++; if (got_d != 4000) begin failures++; $display("default-size instance gave %0d outputs", got_d); end
    $display("max error %0d LSB, at the default size %0d LSB", maxerr, maxerr_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
