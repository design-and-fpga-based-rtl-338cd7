// tb_dft_precoder: random symbols through the transform precoder for
// M = 1, 3, 6, 12; outputs compared with a floating-point DFT scaled by
// 1/sqrt(M); the cycle count per symbol is checked against M + M*M + M.
module tb_dft_precoder;
  import nbiot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  logic [3:0] m_sc;
  logic in_valid, in_ready, out_valid, out_last, out_ready;
  cplx_t in_sym, out_sym;

  dft_precoder dut (.clk, .rst_n, .m_sc, .in_valid, .in_sym, .in_ready, .out_valid, .out_sym,
    .out_last, .out_ready);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int xr [12], xi [12];
  real yr, yi, pi2;
  int ms [4] = '{1, 3, 6, 12};
  int cyc;

  initial begin
    pi2 = 2.0 * 3.14159265358979;
    m_sc = 12; in_valid = 0; in_sym = '0; out_ready = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      automatic int M = ms[t % 4];
      for (int n = 0; n < M; n++) begin
        xr[n] = $urandom_range(0, 16000) - 8000; xi[n] = $urandom_range(0, 16000) - 8000;
      end
      @(negedge clk); m_sc = 4'(M); cyc = 0;
      for (int n = 0; n < M; n++) begin
        in_valid = 1; in_sym.re = 16'(xr[n]); in_sym.im = 16'(xi[n]);
        @(negedge clk); cyc++;
      end
      in_valid = 0;
      while (!out_valid) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != M + M * M) begin failures++; $display("M=%0d latency %0d", M, cyc); end
      for (int k = 0; k < M; k++) begin
        yr = 0; yi = 0;
        for (int n = 0; n < M; n++) begin
          yr += xr[n] * $cos(pi2 * n * k / M) + xi[n] * $sin(pi2 * n * k / M);
          yi += xi[n] * $cos(pi2 * n * k / M) - xr[n] * $sin(pi2 * n * k / M);
        end
        yr = yr / $sqrt(M); yi = yi / $sqrt(M);
        checks++;
        if (!out_valid || (out_last != (k == M - 1)) ||
            fabs(real'(out_sym.re) - yr) > 6.0 || fabs(real'(out_sym.im) - yi) > 6.0) begin
          failures++; $display("M=%0d k=%0d got %0d,%0d exp %f,%f", M, k, out_sym.re, out_sym.im, yr, yi);
        end
        if (k == 1) begin out_ready = 0; @(negedge clk); out_ready = 1; end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
