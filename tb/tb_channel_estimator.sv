// tb_channel_estimator: a resource grid whose pilots went through a
// channel that varies linearly over frequency; the 12 interpolated
// estimates must match the channel. Pilot values come from a direct
// evaluation of the NRS formulas.
module tb_channel_estimator;
  import nbiot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  logic start, done;
  logic [4:0] ns0;
  logic [8:0] cell_id;
  logic [3:0] rd_sc, rd_sym;
  cplx_t rd_data;
  cplx_t h_out [12];

  channel_estimator dut (.clk, .rst_n, .start, .ns0, .cell_id, .rd_sc, .rd_sym, .rd_data, .done, .h_out);

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  cplx_t grid [14][12];
  assign rd_data = grid[rd_sym][rd_sc];

  bit x1 [1640], x2 [1640];
  real hr [12], hi [12];

  task automatic place_pilots(input int vns, input int vl, input int cid, input int sym);
    longint ci;
    int base;
    ci = (longint'(1024) * (7 * (vns + 1) + vl + 1) * (2 * cid + 1) + 2 * cid + 1) % (longint'(1) << 31);
    for (int i = 0; i < 31; i++) begin x1[i] = (i == 0); x2[i] = ci[i]; end
    for (int n = 0; n < 1604; n++) begin
      x1[n+31] = x1[n+3] ^ x1[n];
      x2[n+31] = x2[n+3] ^ x2[n+2] ^ x2[n+1] ^ x2[n];
    end
    base = (cid % 6 + ((vl == 6) ? 3 : 0)) % 6;
    for (int m = 0; m < 2; m++) begin
      automatic int k = 6 * m + base;
      automatic real a = (x1[1600+2*m] ^ x2[1600+2*m]) ? -1.0 : 1.0;
      automatic real b = (x1[1601+2*m] ^ x2[1601+2*m]) ? -1.0 : 1.0;
      // y = h * (a + jb)/sqrt(2)
      grid[sym][k].re = 16'(int'((hr[k] * a - hi[k] * b) * 0.7071067811865476));
      grid[sym][k].im = 16'(int'((hr[k] * b + hi[k] * a) * 0.7071067811865476));
    end
  endtask

  initial begin
    start = 0; ns0 = 0; cell_id = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      automatic int cid = (t == 0) ? 1 : $urandom_range(0, 503);
      automatic int vns = 2 * $urandom_range(0, 9);
      automatic real r0 = real'($urandom_range(0, 16000)) - 8000.0, i0 = real'($urandom_range(0, 16000)) - 8000.0;
      automatic real dr = real'($urandom_range(0, 800)) - 400.0, di = real'($urandom_range(0, 800)) - 400.0;
      for (int k = 0; k < 12; k++) begin hr[k] = r0 + dr * k; hi[k] = i0 + di * k; end
      for (int s = 0; s < 14; s++) for (int k = 0; k < 12; k++) grid[s][k] = $urandom;
      for (int q = 0; q < 4; q++) place_pilots(vns + q / 2, 5 + q % 2, cid, 7 * (q / 2) + 5 + q % 2);
      @(negedge clk); start = 1; ns0 = 5'(vns); cell_id = 9'(cid);
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      for (int k = 0; k < 12; k++) begin
        checks++;
        if (fabs(real'(h_out[k].re) - hr[k]) > 12.0 || fabs(real'(h_out[k].im) - hi[k]) > 12.0) begin
          failures++; $display("t=%0d k=%0d got %0d,%0d exp %f,%f", t, k, h_out[k].re, h_out[k].im, hr[k], hi[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
