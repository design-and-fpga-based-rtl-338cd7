// tb_interpolator: checks sample counts, cyclic prefix lengths and
// interpolated values for both subcarrier spacings (x8 and x32).
module tb_interpolator;
  import nbiot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  logic mode_3k75, first_of_slot, in_valid, in_ready, out_valid, out_last;
  cplx_t in_smp [16];
  cplx_t out_smp;

  interpolator dut (.clk, .rst_n, .mode_3k75, .first_of_slot, .in_valid, .in_smp, .in_ready,
    .out_valid, .out_smp, .out_last);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int xr [16], xi [16];
  initial begin
    mode_3k75 = 0; first_of_slot = 0; in_valid = 0;
    for (int b = 0; b < 16; b++) in_smp[b] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      automatic int U = (t >= 4) ? 32 : 8;
      automatic int ncp = (t >= 4) ? ((t % 2 == 0) ? 40 : 36) : ((t % 2 == 0) ? 10 : 9);
      automatic int cnt = 0;
      @(negedge clk);
      mode_3k75 = (t >= 4); first_of_slot = (t % 2 == 0); in_valid = 1;
      for (int b = 0; b < 16; b++) begin
        xr[b] = int'($urandom_range(0, 20000)) - 10000; xi[b] = int'($urandom_range(0, 20000)) - 10000;
        in_smp[b].re = 16'(xr[b]); in_smp[b].im = 16'(xi[b]);
      end
      @(negedge clk); in_valid = 0;
      checks++; if (in_ready) failures++;
      while (out_valid) begin
        // time index within the symbol: CP is the tail of the symbol
        automatic int n = (cnt < ncp) ? 16 * U - ncp + cnt : cnt - ncp;
        automatic int i0 = n / U, i1 = (n / U + 1) % 16;
        automatic real fr = real'(n % U) / U;
        automatic real er = xr[i0] + (xr[i1] - xr[i0]) * fr;
        automatic real ei = xi[i0] + (xi[i1] - xi[i0]) * fr;
        checks++;
        if (fabs(real'(out_smp.re) - er) > 1.5 || fabs(real'(out_smp.im) - ei) > 1.5) begin
          failures++; if (failures < 6) $display("U=%0d cnt=%0d got %0d exp %f", U, cnt, out_smp.re, er);
        end
        cnt++;
        @(negedge clk);
      end
      checks++;
      if (cnt != ncp + 16 * U) begin failures++; $display("U=%0d count %0d", U, cnt); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
