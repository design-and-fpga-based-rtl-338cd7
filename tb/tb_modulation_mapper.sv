// tb_modulation_mapper: checks the BPSK and QPSK constellation tables and
// the two-clock QPSK symbol timing.
module tb_modulation_mapper;
  import nbiot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, qpsk, in_valid, in_bit, in_ready, out_valid, out_ready;
  cplx_t out_sym;

  modulation_mapper dut (.clk, .rst_n, .start, .qpsk, .in_valid, .in_bit, .in_ready,
    .out_valid, .out_sym, .out_ready);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; qpsk = 0; in_valid = 0; in_bit = 0; out_ready = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    // BPSK: 0 -> (+a,+a), 1 -> (-a,-a), one symbol per clock
    for (int i = 0; i < 50; i++) begin
      @(negedge clk); in_valid = 1; in_bit = 1'($urandom); #1;
      checks++;
      if (!out_valid || out_sym.re != (in_bit ? -16'sd11585 : 16'sd11585) || out_sym.im != out_sym.re)
        failures++;
    end
    qpsk = 1; in_valid = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int i = 0; i < 50; i++) begin
      automatic logic b0 = 1'($urandom), b1 = 1'($urandom);
      @(negedge clk); in_valid = 1; in_bit = b0; #1;
      checks++; if (out_valid) failures++;
      @(negedge clk); in_bit = b1; #1;
      checks++;
      if (!out_valid || out_sym.re != (b0 ? -16'sd11585 : 16'sd11585) || out_sym.im != (b1 ? -16'sd11585 : 16'sd11585))
        begin failures++; $display("qpsk %b%b -> %0d %0d", b0, b1, out_sym.re, out_sym.im); end
    end
    // stall on the second bit holds the first
    @(negedge clk); in_bit = 1; in_valid = 1; #1;
    @(negedge clk); out_ready = 0; in_bit = 0; #1;
    checks++; if (in_ready) failures++;
    @(negedge clk); out_ready = 1; #1;
    checks++; if (!(out_valid && out_sym.re < 0 && out_sym.im > 0)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
