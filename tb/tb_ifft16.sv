// tb_ifft16: random 16-bin frames, back to back, compared with a
// floating-point inverse DFT scaled by 1/16; checks the 4-clock latency.
module tb_ifft16;
  import nbiot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  logic in_valid, out_valid, busy;
  cplx_t in_bins [16];
  cplx_t out_smp [16];

  ifft16 dut (.clk, .rst_n, .in_valid, .in_bins, .out_valid, .out_smp, .busy);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int fr [20][16], fi [20][16];
  int nout = 0;
  real pi2 = 6.283185307179586;
  always @(negedge clk) if (rst_n && out_valid) begin
    for (int n = 0; n < 16; n++) begin
      real er, ei;
      er = 0; ei = 0;
      for (int k = 0; k < 16; k++) begin
        er += fr[nout][k] * $cos(pi2 * k * n / 16) - fi[nout][k] * $sin(pi2 * k * n / 16);
        ei += fr[nout][k] * $sin(pi2 * k * n / 16) + fi[nout][k] * $cos(pi2 * k * n / 16);
      end
      er /= 16.0; ei /= 16.0;
      checks++;
      if (fabs(real'(out_smp[n].re) - er) > 4.0 || fabs(real'(out_smp[n].im) - ei) > 4.0) begin
        failures++; if (failures < 6) $display("frame %0d n=%0d got %0d,%0d exp %f,%f", nout, n, out_smp[n].re, out_smp[n].im, er, ei);
      end
    end
    nout++;
  end

  initial begin
    int lat;
    in_valid = 0;
    for (int b = 0; b < 16; b++) in_bins[b] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      @(negedge clk);
      in_valid = 1;
      for (int b = 0; b < 16; b++) begin
        fr[f][b] = (f == 0) ? ((b == 3) ? 16384 : 0) : int'($urandom_range(0, 32000)) - 16000;
        fi[f][b] = (f == 0) ? 0 : int'($urandom_range(0, 32000)) - 16000;
        in_bins[b].re = 16'(fr[f][b]); in_bins[b].im = 16'(fi[f][b]);
      end
      if (f == 0) begin
        @(negedge clk); in_valid = 0; lat = 1;
        while (!out_valid) begin @(negedge clk); lat++; end
        checks++; if (lat != 4) begin failures++; $display("latency %0d", lat); end
        @(negedge clk);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (8) @(negedge clk);
    checks++; if (nout != 20) begin failures++; $display("frames out %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
