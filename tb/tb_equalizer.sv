// tb_equalizer: random elements and channel values; output must equal
// s * conj(h) / 2^14 (within rounding), one clock later.
module tb_equalizer;
  import nbiot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, out_valid;
  cplx_t in_re, h, out_re;

  equalizer dut (.clk, .rst_n, .in_valid, .in_re, .h, .out_valid, .out_re);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; in_re = '0; h = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      automatic int sr = int'($urandom_range(0, 30000)) - 15000, si = int'($urandom_range(0, 30000)) - 15000;
      automatic int hr = int'($urandom_range(0, 30000)) - 15000, hi = int'($urandom_range(0, 30000)) - 15000;
      automatic real er = (real'(sr) * hr + real'(si) * hi) / 16384.0;
      automatic real ei = (real'(si) * hr - real'(sr) * hi) / 16384.0;
      @(negedge clk);
      in_valid = 1; in_re.re = 16'(sr); in_re.im = 16'(si); h.re = 16'(hr); h.im = 16'(hi);
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid || real'(out_re.re) > er + 0.01 || real'(out_re.re) < er - 1.01 ||
          real'(out_re.im) > ei + 0.01 || real'(out_re.im) < ei - 1.01) begin
        failures++; if (failures < 6) $display("got %0d,%0d exp %f,%f", out_re.re, out_re.im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
