// tb_turbo_encoder: encodes random blocks and compares all K+4 output
// triplets with a software model of the 3GPP turbo encoder (QPP
// interleaver evaluated directly, RSC encoders and trellis termination).
module tb_turbo_encoder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, in_valid, in_bit, in_ready, out_valid, out_last, busy;
  logic [11:0] k_len, f1, f2;
  logic [2:0] out_d;

  turbo_encoder #(.KMAX(2560)) dut (.clk, .rst_n, .start, .k_len, .f1, .f2, .in_valid, .in_bit,
    .in_ready, .out_valid, .out_d, .out_last, .busy);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [2:0] got [$];
  always @(posedge clk) if (out_valid) got.push_back(out_d);

  // one RSC step: s[0]=D, s[1]=D^2, s[2]=D^3 ; g0 = 1+D^2+D^3, g1 = 1+D+D^3
  // returns {next state, parity}
  function automatic logic [3:0] rsc(input logic [2:0] s, input logic xin);
    logic a;
    a = xin ^ s[1] ^ s[2];
    return {s[1], s[0], a, a ^ s[0] ^ s[2]};
  endfunction

  int ks [3] = '{40, 64, 512};
  int f1s [3] = '{3, 7, 31};
  int f2s [3] = '{10, 16, 64};
  logic cb [2560];
  logic cpb [2560];
  logic [2:0] exp_d [2564];
  logic [2:0] s1, s2;
  logic [3:0] r1, r2;
  logic xt [3], zt [3], xpt [3], zpt [3];
  int K;
  longint pidx;

  initial begin
    start = 0; in_valid = 0; in_bit = 0; k_len = 0; f1 = 0; f2 = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      K = ks[t];
      for (int i = 0; i < K; i++) cb[i] = 1'($urandom);
      for (int i = 0; i < K; i++) begin
        pidx = (longint'(f1s[t]) * i + longint'(f2s[t]) * i * i) % K;
        cpb[i] = cb[int'(pidx)];
      end
      s1 = 0; s2 = 0;
      for (int i = 0; i < K; i++) begin
        r1 = rsc(s1, cb[i]); r2 = rsc(s2, cpb[i]);
        exp_d[i] = {r2[0], r1[0], cb[i]};
        s1 = r1[3:1]; s2 = r2[3:1];
      end
      for (int j = 0; j < 3; j++) begin
        xt[j] = s1[1] ^ s1[2]; r1 = rsc(s1, xt[j]); zt[j] = r1[0]; s1 = r1[3:1];
        xpt[j] = s2[1] ^ s2[2]; r2 = rsc(s2, xpt[j]); zpt[j] = r2[0]; s2 = r2[3:1];
      end
      exp_d[K]   = {xt[1], zt[0], xt[0]};
      exp_d[K+1] = {zt[2], xt[2], zt[1]};
      exp_d[K+2] = {xpt[1], zpt[0], xpt[0]};
      exp_d[K+3] = {zpt[2], xpt[2], zpt[1]};
      got.delete();
      @(negedge clk); start = 1; k_len = 12'(K); f1 = 12'(f1s[t]); f2 = 12'(f2s[t]);
      @(negedge clk); start = 0;
      for (int i = 0; i < K; i++) begin in_valid = 1; in_bit = cb[i]; @(negedge clk); end
      in_valid = 0;
      while (busy) @(negedge clk);
      @(negedge clk);
      checks++;
      if (got.size() != K + 4) begin failures++; $display("K=%0d got %0d triplets", K, got.size()); end
      for (int i = 0; i < K + 4 && i < got.size(); i++) begin
        checks++;
        if (got[i] !== exp_d[i]) begin failures++; if (failures < 8) $display("K=%0d i=%0d got %b exp %b", K, i, got[i], exp_d[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
