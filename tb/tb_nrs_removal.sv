// tb_nrs_removal: reads a grid whose elements encode their position and
// checks the serial order, the skipped NRS positions, the 160 elements
// per subframe and the one-element-per-two-clocks rate.
module tb_nrs_removal;
  import nbiot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, out_valid, done;
  logic [8:0] cell_id;
  logic [3:0] rd_sc, rd_sym, out_sc;
  cplx_t rd_data, out_re;

  nrs_removal dut (.clk, .rst_n, .start, .cell_id, .rd_sc, .rd_sym, .rd_data, .out_valid, .out_re, .out_sc, .done);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  assign rd_data = '{re: 16'(rd_sym), im: 16'(rd_sc)};
  int got_sym [$], got_sc [$], got_t [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      got_sym.push_back(out_re.re); got_sc.push_back(out_re.im); got_t.push_back(cyc);
      if (out_sc != 4'(out_re.im)) failures++;
    end
  end

  initial begin
    start = 0; cell_id = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      automatic int cid = $urandom_range(0, 503);
      automatic int idx = 0;
      got_sym.delete(); got_sc.delete(); got_t.delete();
      @(negedge clk); start = 1; cell_id = 9'(cid); @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      checks++; if (got_sym.size() != 160) begin failures++; $display("count %0d", got_sym.size()); end
      for (int s = 0; s < 14; s++)
        for (int k = 0; k < 12; k++) begin
          automatic int l = s % 7;
          automatic bit nrs = (l == 5 && k % 6 == cid % 6) || (l == 6 && k % 6 == (cid + 3) % 6);
          if (!nrs) begin
            checks++;
            if (idx >= got_sym.size() || got_sym[idx] != s || got_sc[idx] != k) begin
              failures++; if (failures < 6) $display("idx %0d expected s=%0d k=%0d", idx, s, k);
            end
            if (idx > 0 && idx < got_t.size()) begin
              checks++; if (got_t[idx] - got_t[idx-1] < 2) failures++;
            end
            idx++;
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
