// tb_transpose_ctrl: transpose controller (LOG2N = 6, K = 2) with the
// behavioural memory model. Three frames of tagged points (real part =
// stream position, imaginary part = frame) arrive back to back in the order a
// unit's last stage produces them; output pair t must hold positions
// rotl(2t, K) and rotl(2t+1, K) of the same frame, gap-free, and the first
// pair must appear RDLAT + 2 clocks after the last pair of the frame went in.
// Both ping-pong banks must be used.
module tb_transpose_ctrl;
  import fft_pkg::*;
  localparam int LOG2N = 6, K = 2, RDLAT = 3, N = 1 << LOG2N, FR = 3;
  logic clk = 0, rst = 1;
  logic in_valid = 0, out_valid;
  cplx_t in0, in1, out0, out1;
  logic mem_we, mem_re;
  logic [LOG2N:0] mem_waddr0, mem_waddr1, mem_raddr0, mem_raddr1;
  cplx_t mem_wdata0, mem_wdata1, mem_rdata0, mem_rdata1;
  int checks = 0, failures = 0;
  int cyc = 0, tlast = -1, tfirst = -1;
  bit bank_used [2];

  transpose_ctrl #(.LOG2N(LOG2N), .K(K), .RDLAT(RDLAT)) dut (.*);
  ddr2_mem_model #(.AW(LOG2N + 1), .RDLAT(RDLAT)) u_mem (
    .clk, .we(mem_we), .waddr0(mem_waddr0), .waddr1(mem_waddr1),
    .wdata0(mem_wdata0), .wdata1(mem_wdata1), .re(mem_re),
    .raddr0(mem_raddr0), .raddr1(mem_raddr1), .rdata0(mem_rdata0), .rdata1(mem_rdata1)
  );
  always #5 clk = ~clk;

  int nin = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && in_valid) begin
      nin <= nin + 1;
      if (nin == N / 2 - 1) tlast <= cyc;
    end
    if (!rst && out_valid && tfirst < 0) tfirst <= cyc;
    if (!rst && mem_we) bank_used[mem_waddr0[LOG2N]] = 1'b1;
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
          for (int t = 0; t < N / 2; t++) begin
            longint p;
            p = longint'(pair_pos(64'(t), K));
            @(negedge clk);
            in0 <= tag(p, f); in1 <= tag(p + (1 << (K - 1)), f); in_valid <= 1;
          end
        @(negedge clk); in_valid <= 0;
      end
      begin
        bit started = 0;
        for (int f = 0; f < FR; f++)
          for (int t = 0; t < N / 2; t++) begin
            longint p0, p1;
            @(posedge clk);
            if (!started) begin
              while (!out_valid) @(posedge clk);
              started = 1;
            end
            p0 = longint'(rotl(64'(2 * t), LOG2N, K));
            p1 = longint'(rotl(64'(2 * t + 1), LOG2N, K));
            checks++;
            if (!out_valid || out0 != tag(p0, f) || out1 != tag(p1, f)) begin
              failures++;
              if (failures < 10)
                $display("f%0d t%0d: v=%0d got %0d/%0d %0d/%0d exp %0d %0d", f, t, out_valid,
                         out0.re, out0.im, out1.re, out1.im, p0, p1);
            end
          end
      end
    join
    checks++;
    if (tfirst - tlast != RDLAT + 2) begin
      failures++; $display("latency %0d", tfirst - tlast);
    end
    checks++;
    if (!bank_used[0] || !bank_used[1]) begin failures++; $display("bank unused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
