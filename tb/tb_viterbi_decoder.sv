// tb_viterbi_decoder: random blocks are tail-biting convolutionally encoded
// by a reference encoder written from the generator polynomials (133, 171,
// 165 octal, encoder initialised with the last six bits). The decoder must
// return the block, also with a few channel bit errors, and report a
// tail-biting path. The output burst is K clocks long.
module tb_viterbi_decoder;
  import nbiot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int KM = 512;
  logic start, in_valid, out_valid, out_bit, out_last, tail_biting, busy;
  logic [$clog2(KM+1)-1:0] k_len;
  logic [2:0] in_d, iterations;

  viterbi_decoder #(.KMAX(KM)) dut (.clk, .rst_n, .start, .k_len, .in_valid, .in_d, .out_valid, .out_bit,
                     .out_last, .tail_biting, .iterations, .busy);

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit c [KM];
  logic [2:0] enc [KM];
  bit got [$];
  int lasts, tb_flag, first_t, last_t, cyc;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      if (got.size() == 0) first_t = cyc;
      got.push_back(out_bit);
      if (out_last) begin lasts++; tb_flag = tail_biting; last_t = cyc; end
    end
  end

  localparam logic [6:0] G [3] = '{7'o133, 7'o171, 7'o165};

  initial begin
    int k, nerr;
    start = 0; in_valid = 0; in_d = 0; k_len = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      k = (t < 2) ? 40 : (t < 4) ? 120 : $urandom_range(24, KM);
      nerr = (t % 2) ? 3 : 0;
      for (int i = 0; i < k; i++) c[i] = $urandom_range(0, 1);
      for (int i = 0; i < k; i++)
        for (int g = 0; g < 3; g++) begin
          automatic bit x = 0;
          for (int j = 0; j <= 6; j++) x ^= G[g][6 - j] & c[(i - j + k) % k];
          enc[i][g] = x;
        end
      // spread errors far apart
      for (int n = 0; n < nerr; n++) enc[(n * k) / nerr][n % 3] ^= 1'b1;
      got.delete(); lasts = 0;
      @(negedge clk); start = 1; k_len = ($bits(k_len))'(k);
      @(negedge clk); start = 0;
      for (int i = 0; i < k; i++) begin in_valid = 1; in_d = enc[i]; @(negedge clk); end
      in_valid = 0;
      while (busy) @(negedge clk);
      repeat (2) @(negedge clk);
      checks++; if (got.size() != k || lasts != 1) begin failures++; $display("t=%0d size %0d", t, got.size()); end
      checks++; if (last_t - first_t != k - 1) begin failures++; $display("burst %0d", last_t - first_t + 1); end
      checks++; if (!tb_flag) begin failures++; $display("t=%0d not tail-biting, iter %0d", t, iterations); end
      for (int i = 0; i < k && i < got.size(); i++) begin
        checks++; if (got[i] != c[i]) begin failures++; if (failures < 8) $display("t=%0d k=%0d i=%0d", t, k, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
