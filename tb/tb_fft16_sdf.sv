// tb_fft16_sdf: streams random 16-sample symbols (with input gaps)
// through the SDF FFT and compares every bin, identified by out_idx, with
// a floating-point DFT scaled by 1/16.
module tb_fft16_sdf;
  import nbiot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  logic clear, in_valid, out_valid;
  logic [3:0] out_idx;
  cplx_t in_smp, out_smp;

  fft16_sdf dut (.clk, .rst_n, .clear, .in_valid, .in_smp, .out_valid, .out_smp, .out_idx);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam int NSYMB = 12;
  int xr [NSYMB+1][16], xi [NSYMB+1][16];
  int nout = 0;
  bit seen [16];
  always @(negedge clk) if (rst_n && out_valid && nout < NSYMB * 16) begin
    automatic int s = nout / 16;
    automatic int k = out_idx;
    automatic real er = 0, ei = 0;
    for (int n = 0; n < 16; n++) begin
      automatic real th = 6.283185307179586 * k * n / 16.0;
      er += xr[s][n] * $cos(th) + xi[s][n] * $sin(th);
      ei += xi[s][n] * $cos(th) - xr[s][n] * $sin(th);
    end
    er /= 16.0; ei /= 16.0;
    checks++;
    if (fabs(real'(out_smp.re) - er) > 6.0 || fabs(real'(out_smp.im) - ei) > 6.0) begin
      failures++; if (failures < 6) $display("sym %0d bin %0d got %0d,%0d exp %f,%f", s, k, out_smp.re, out_smp.im, er, ei);
    end
    if (s == 0) seen[k] = 1;
    nout++;
  end

  initial begin
    clear = 0; in_valid = 0; in_smp = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int s = 0; s <= NSYMB; s++)
      for (int n = 0; n < 16; n++) begin
        xr[s][n] = (s == NSYMB) ? 0 : int'($urandom_range(0, 30000)) - 15000;
        xi[s][n] = (s == NSYMB) ? 0 : int'($urandom_range(0, 30000)) - 15000;
      end
    for (int s = 0; s <= NSYMB; s++)
      for (int n = 0; n < 16; n++) begin
        @(negedge clk);
        if (s == 3 && n == 5) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_smp.re = 16'(xr[s][n]); in_smp.im = 16'(xi[s][n]);
      end
    @(negedge clk); in_valid = 0;
    repeat (20) @(negedge clk);
    checks++; if (nout != NSYMB * 16) begin failures++; $display("outputs %0d", nout); end
    foreach (seen[k]) begin checks++; if (!seen[k]) begin failures++; $display("bin %0d missing", k); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
