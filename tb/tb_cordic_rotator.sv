// tb_cordic_rotator: random samples and angles, compared with a
// floating-point rotation; checks the STAGES+2 latency.
module tb_cordic_rotator;
  import nbiot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  logic in_valid, out_valid;
  logic [15:0] angle;
  cplx_t in_smp, out_smp;

  cordic_rotator dut (.clk, .rst_n, .in_valid, .in_smp, .angle, .out_valid, .out_smp);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam int N = 300;
  real er [N], ei [N];
  int nin = 0, nout = 0, first_out = -1, cyc = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n && out_valid) begin
    if (first_out < 0) first_out = cyc;
    checks++;
    if (fabs(real'(out_smp.re) - er[nout]) > 8.0 || fabs(real'(out_smp.im) - ei[nout]) > 8.0) begin
      failures++; if (failures < 6) $display("%0d got %0d,%0d exp %f,%f", nout, out_smp.re, out_smp.im, er[nout], ei[nout]);
    end
    nout++;
  end

  initial begin
    int start_cyc;
    in_valid = 0; in_smp = '0; angle = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); start_cyc = cyc;
    for (int i = 0; i < N; i++) begin
      automatic int xr = int'($urandom_range(0, 24000)) - 12000, xi = int'($urandom_range(0, 24000)) - 12000;
      automatic int a = $urandom_range(0, 65535);
      automatic real th = 6.283185307179586 * a / 65536.0;
      in_valid = 1; in_smp.re = 16'(xr); in_smp.im = 16'(xi); angle = 16'(a);
      er[i] = xr * $cos(th) - xi * $sin(th);
      ei[i] = xr * $sin(th) + xi * $cos(th);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (25) @(negedge clk);
    checks++; if (nout != N) begin failures++; $display("outputs %0d", nout); end
    checks++; if (first_out - start_cyc != 17) begin failures++; $display("latency %0d", first_out - start_cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
