// tb_nrs_gen: NRS pilots and positions compared with c_init, the Gold
// recursion and the QPSK rule evaluated directly.
module tb_nrs_gen;
  import nbiot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, done;
  logic [4:0] ns;
  logic [2:0] l;
  logic [8:0] cell_id;
  cplx_t pilot [2];
  logic [3:0] k_pos [2];

  nrs_gen dut (.clk, .rst_n, .start, .ns, .l, .cell_id, .done, .pilot, .k_pos);

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit x1 [1640], x2 [1640];
  bit cc [4];
  initial begin
    start = 0; ns = 0; l = 5; cell_id = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      automatic int vns = $urandom_range(0, 19), vl = 5 + (t % 2), cid = (t == 0) ? 0 : $urandom_range(0, 503);
      automatic longint ci = (longint'(1024) * (7 * (vns + 1) + vl + 1) * (2 * cid + 1) + 2 * cid + 1) % (longint'(1) << 31);
      automatic int lat = 0;
      automatic int vs = cid % 6;
      automatic int base = (vs + ((vl == 6) ? 3 : 0)) % 6;
      for (int i = 0; i < 31; i++) begin x1[i] = (i == 0); x2[i] = ci[i]; end
      for (int n = 0; n < 1604; n++) begin
        x1[n+31] = x1[n+3] ^ x1[n];
        x2[n+31] = x2[n+3] ^ x2[n+2] ^ x2[n+1] ^ x2[n];
      end
      for (int n = 0; n < 4; n++) cc[n] = x1[n+1600] ^ x2[n+1600];
      @(negedge clk); start = 1; ns = 5'(vns); l = 3'(vl); cell_id = 9'(cid);
      @(negedge clk); start = 0;
      while (!done) begin @(negedge clk); lat++; end
      checks++; if (lat > 1610) begin failures++; $display("latency %0d", lat); end
      for (int m = 0; m < 2; m++) begin
        checks++;
        if (pilot[m].re != (cc[2*m] ? -AMP : AMP) || pilot[m].im != (cc[2*m+1] ? -AMP : AMP) ||
            k_pos[m] != 4'(6 * m + base)) begin
          failures++; $display("t=%0d m=%0d pilot %0d,%0d k=%0d", t, m, pilot[m].re, pilot[m].im, k_pos[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
