// tb_coarse_sync: a reduced-size detector (8-sample symbols, reduction by
// 4, 200-sample frames) sees one frame of noise and then frames with an
// 11-symbol code-covered repetition sequence under a frequency offset.
// Checks: no detection on noise, a detection per frame afterwards, the
// start position within the reduction resolution, the phase of the peak
// correlation (-2*pi*offset*lag), and one report per frame.
module tb_coarse_sync;
  import nbiot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NS = 8, RED = 4, NM = 50, FRAME = NS * 0 + NM * RED, P = 57;
  localparam int MWD = 37;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction

  logic in_valid, peak_valid, peak_found;
  cplx_t in_smp;
  logic [MWD-1:0] threshold, peak_metric;
  logic [$clog2(FRAME)-1:0] npss_start;
  logic signed [MWD-1:0] peak_re, peak_im;

  coarse_sync #(.NS(NS), .RED(RED), .NM(NM)) dut (.clk, .rst_n, .in_valid, .in_smp, .threshold,
      .peak_valid, .peak_found, .npss_start, .peak_metric, .peak_re, .peak_im);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam int S [11] = '{1, 1, 1, 1, -1, -1, 1, 1, 1, -1, 1};
  real base_re [NS], base_im [NS];
  real f = 0.01;      // offset in cycles per sample
  int reports = 0, frame_no = 0, last_rep = -1, cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && peak_valid) begin
      reports++;
      if (frame_no == 0) begin
        checks++; if (peak_found) begin failures++; $display("false detection"); end
      end else if (frame_no >= 2) begin
        automatic int err = int'(npss_start) - P;
        automatic real ang = $atan2(real'(peak_im), real'(peak_re));
        automatic real want = -2.0 * 3.141592653589793 * f * NS;
        checks++; if (!peak_found) begin failures++; $display("frame %0d missed", frame_no); end
        checks++; if (err < -RED || err > RED) begin failures++; $display("start %0d", npss_start); end
        checks++; if (fabs(ang - want) > 0.15) begin failures++; $display("angle %f want %f", ang, want); end
      end
      if (last_rep >= 0) begin checks++; if (cyc - last_rep != FRAME) begin failures++; $display("period %0d", cyc - last_rep); end end
      last_rep = cyc;
    end
  end

  initial begin
    threshold = MWD'(1000000);
    in_valid = 0; in_smp = '0;
    for (int i = 0; i < NS; i++) begin
      automatic real a = 2.0 * 3.141592653589793 * real'($urandom_range(0, 999)) / 1000.0;
      base_re[i] = 4000.0 * $cos(a); base_im[i] = 4000.0 * $sin(a);
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (frame_no = 0; frame_no < 4; frame_no++)
      for (int n = 0; n < FRAME; n++) begin
        automatic real xr = real'($urandom_range(0, 600)) - 300.0;
        automatic real xi = real'($urandom_range(0, 600)) - 300.0;
        if (frame_no > 0 && n >= P && n < P + 11 * NS) begin
          automatic int q = n - P;
          automatic real sr = S[q / NS] * base_re[q % NS], si = S[q / NS] * base_im[q % NS];
          automatic real ph = 2.0 * 3.141592653589793 * f * n;
          xr += sr * $cos(ph) - si * $sin(ph);
          xi += sr * $sin(ph) + si * $cos(ph);
        end
        @(negedge clk); in_valid = 1; in_smp.re = 16'(int'(xr)); in_smp.im = 16'(int'(xi));
      end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks++; if (reports != 4) begin failures++; $display("reports %0d", reports); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
