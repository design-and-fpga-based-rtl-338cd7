// tb_rate_matcher: compares the rate matcher output with the 36.212
// turbo rate-matching definition evaluated directly (sub-block interleaver
// index formulas, NULL insertion, bit collection, k0 and circular read).
module tb_rate_matcher;
  import nbiot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, in_valid, out_valid, out_bit, out_last, busy;
  logic [12:0] d_len;
  logic [1:0] rv;
  logic [15:0] e_len;
  logic [2:0] in_d;

  rate_matcher dut (.clk, .rst_n, .start, .d_len, .rv, .e_len, .in_valid, .in_d,
    .out_valid, .out_bit, .out_last, .busy);

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic got [$];
  always @(posedge clk) if (out_valid) got.push_back(out_bit);

  int P [32] = '{0,16,8,24,4,20,12,28,2,18,10,26,6,22,14,30,1,17,9,25,5,21,13,29,3,19,11,27,7,23,15,31};
  logic dd [3][2600];
  int   ww [3 * 2600];     // -1 = NULL
  logic expb [6000];
  int D, E, R, KP, ND, k0, cnt, pos;

  initial begin
    int Ds [4] = '{44, 68, 132, 2564};
    int Es [4] = '{200, 90, 500, 3000};
    start = 0; in_valid = 0; in_d = 0; d_len = 0; rv = 0; e_len = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      D = Ds[t]; E = Es[t];
      R = (D + 31) / 32; KP = R * 32; ND = KP - D;
      for (int s = 0; s < 3; s++) for (int i = 0; i < D; i++) dd[s][i] = 1'($urandom);
      // y_k = NULL for k < ND, d(k-ND) otherwise; v0, v1 via P, v2 via shifted index
      for (int k = 0; k < KP; k++) begin
        int col, row, y, y2;
        col = k / R; row = k % R;
        y  = P[col] + 32 * row;
        y2 = (P[col] + 32 * row + 1) % KP;
        ww[k]          = (y  < ND) ? -1 : int'(dd[0][y - ND]);
        ww[KP + 2*k]   = (y  < ND) ? -1 : int'(dd[1][y - ND]);
        ww[KP + 2*k+1] = (y2 < ND) ? -1 : int'(dd[2][y2 - ND]);
      end
      k0 = R * (24 * (t % 4) + 2);
      cnt = 0; pos = 0;
      while (cnt < E) begin
        if (ww[(k0 + pos) % (3 * KP)] != -1) begin expb[cnt] = 1'(ww[(k0 + pos) % (3 * KP)]); cnt++; end
        pos++;
      end
      got.delete();
      @(negedge clk); start = 1; d_len = 13'(D); rv = 2'(t % 4); e_len = 16'(E);
      @(negedge clk); start = 0;
      for (int i = 0; i < D; i++) begin
        in_valid = 1; in_d = {dd[2][i], dd[1][i], dd[0][i]}; @(negedge clk);
      end
      in_valid = 0;
      while (busy) @(negedge clk);
      @(negedge clk);
      checks++;
      if (got.size() != E) begin failures++; $display("D=%0d E=%0d got %0d", D, E, got.size()); end
      for (int i = 0; i < E && i < got.size(); i++) begin
        checks++;
        if (got[i] !== expb[i]) begin failures++; if (failures < 8) $display("D=%0d rv=%0d bit %0d", D, t, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
