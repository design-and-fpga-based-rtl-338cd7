// tb_ul_re_mapper: checks that M symbols land on subcarriers
// sc_start..sc_start+M-1, laid onto IFFT bins around DC, with zeros
// elsewhere, and that the frame is held until out_ready.
module tb_ul_re_mapper;
  import nbiot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [3:0] m_sc, sc_start;
  logic in_valid, in_ready, out_valid, out_ready;
  cplx_t in_sym;
  cplx_t out_bins [16];

  ul_re_mapper dut (.clk, .rst_n, .m_sc, .sc_start, .in_valid, .in_sym, .in_ready, .out_valid,
    .out_bins, .out_ready);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int ms [4] = '{1, 3, 6, 12};
  cplx_t expb [16];
  initial begin
    m_sc = 0; sc_start = 0; in_valid = 0; in_sym = '0; out_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 16; t++) begin
      automatic int M = ms[t % 4];
      automatic int st = (M == 12) ? 0 : M * $urandom_range(0, 12 / M - 1);
      for (int b = 0; b < 16; b++) expb[b] = '0;
      @(negedge clk); m_sc = 4'(M); sc_start = 4'(st);
      for (int i = 0; i < M; i++) begin
        automatic int sc = st + i;
        automatic int bin = (sc < 6) ? sc + 10 : sc - 6;
        in_valid = 1; in_sym.re = 16'($urandom); in_sym.im = 16'($urandom);
        expb[bin] = in_sym;
        @(negedge clk);
      end
      in_valid = 0;
      repeat (2) @(negedge clk);
      checks++; if (!out_valid || in_ready) failures++;
      for (int b = 0; b < 16; b++) begin
        checks++;
        if (out_bins[b] !== expb[b]) begin failures++; $display("M=%0d st=%0d bin %0d", M, st, b); end
      end
      out_ready = 1; @(negedge clk); out_ready = 0;
      checks++; if (out_valid || !in_ready) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
