// tb_symbol_demapper: two serial bits per element from the signs of I and
// Q, I first, at twice the element rate.
module tb_symbol_demapper;
  import nbiot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, out_valid, out_bit;
  cplx_t in_re;

  symbol_demapper dut (.clk, .rst_n, .in_valid, .in_re, .out_valid, .out_bit);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic expq [$];
  logic got [$];
  always @(posedge clk) if (rst_n && out_valid) got.push_back(out_bit);
  initial begin
    in_valid = 0; in_re = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      in_valid = 1; in_re.re = 16'($urandom); in_re.im = 16'($urandom);
      if (i % 5 == 0) in_re.re = 0;
      expq.push_back(in_re.re < 0); expq.push_back(in_re.im < 0);
      @(negedge clk); in_valid = 0;
      if (i % 3 == 0) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    checks++; if (got.size() != expq.size()) begin failures++; $display("bits %0d", got.size()); end
    for (int i = 0; i < expq.size() && i < got.size(); i++) begin
      checks++; if (got[i] !== expq[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
