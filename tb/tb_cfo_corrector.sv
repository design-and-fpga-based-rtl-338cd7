// tb_cfo_corrector: a constant sample rotated by a frequency offset
// (phase step per sample) must come out as the constant again.
module tb_cfo_corrector;
  import nbiot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  logic clear, in_valid, out_valid;
  logic [15:0] phase_inc;
  cplx_t in_smp, out_smp;

  cfo_corrector dut (.clk, .rst_n, .clear, .phase_inc, .in_valid, .in_smp, .out_valid, .out_smp);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  real br, bi;
  int nout;
  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (fabs(real'(out_smp.re) - br) > 10.0 || fabs(real'(out_smp.im) - bi) > 10.0) begin
      failures++; if (failures < 6) $display("%0d got %0d,%0d exp %f,%f", nout, out_smp.re, out_smp.im, br, bi);
    end
    nout++;
  end

  initial begin
    clear = 0; in_valid = 0; in_smp = '0; phase_inc = 0; nout = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      automatic int inc = (t == 0) ? 0 : $urandom_range(0, 65535);
      br = 9000.0 - 3000.0 * t; bi = -5000.0 + 2500.0 * t;
      @(negedge clk); clear = 1; phase_inc = 16'(inc); @(negedge clk); clear = 0;
      for (int n = 0; n < 200; n++) begin
        automatic real th = 6.283185307179586 * real'((longint'(inc) * n) % 65536) / 65536.0;
        in_valid = 1;
        in_smp.re = 16'(int'(br * $cos(th) - bi * $sin(th)));
        in_smp.im = 16'(int'(br * $sin(th) + bi * $cos(th)));
        @(negedge clk);
      end
      in_valid = 0;
      repeat (20) @(negedge clk);
    end
    checks++; if (nout != 800) begin failures++; $display("outputs %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
