// tb_re_demapper: writes 14 symbols of 16 bins in bit-reversed order and
// checks the 12 x 14 grid (half swap around DC), the 14-clock transfer and
// that the grid holds while the next subframe is written.
module tb_re_demapper;
  import nbiot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear, in_valid, grid_ready;
  logic [3:0] in_bin, rd_sc, rd_sym, rd2_sc, rd2_sym;
  cplx_t in_re, rd_data, rd2_data;

  re_demapper dut (.clk, .rst_n, .clear, .in_valid, .in_re, .in_bin, .grid_ready,
    .rd_sc, .rd_sym, .rd_data, .rd2_sc, .rd2_sym, .rd2_data);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] val [2][14][16];
  task automatic send_sf(input int f);
    for (int s = 0; s < 14; s++)
      for (int p = 0; p < 16; p++) begin
        automatic logic [3:0] b = {p[0], p[1], p[2], p[3]};
        val[f][s][b] = $urandom;
        in_valid = 1; in_bin = b; in_re = val[f][s][b];
        @(negedge clk);
      end
    in_valid = 0;
  endtask

  task automatic check_grid(input int f);
    for (int s = 0; s < 14; s++)
      for (int k = 0; k < 12; k++) begin
        rd_sc = 4'(k); rd_sym = 4'(s); rd2_sc = 4'(11 - k); rd2_sym = 4'(13 - s); #1;
        checks++;
        if (rd_data !== val[f][s][(k < 6) ? k + 10 : k - 6] ||
            rd2_data !== val[f][13 - s][(11 - k < 6) ? 21 - k : 5 - k]) begin
          failures++; if (failures < 6) $display("f=%0d s=%0d k=%0d", f, s, k);
        end
      end
  endtask

  initial begin
    int lat;
    clear = 0; in_valid = 0; in_bin = 0; in_re = '0; rd_sc = 0; rd_sym = 0; rd2_sc = 0; rd2_sym = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    send_sf(0);
    lat = 0;
    while (!grid_ready) begin @(negedge clk); lat++; end
    checks++; if (lat != 14) begin failures++; $display("transfer took %0d", lat); end
    check_grid(0);
    // second subframe: grid must hold the first until the new one is complete
    @(negedge clk);
    for (int s = 0; s < 13; s++)
      for (int p = 0; p < 16; p++) begin
        automatic logic [3:0] b = {p[0], p[1], p[2], p[3]};
        val[1][s][b] = $urandom;
        in_valid = 1; in_bin = b; in_re = val[1][s][b];
        @(negedge clk);
      end
    in_valid = 0;
    check_grid(0);
    @(negedge clk);
    for (int p = 0; p < 16; p++) begin
      automatic logic [3:0] b = {p[0], p[1], p[2], p[3]};
      val[1][13][b] = $urandom;
      in_valid = 1; in_bin = b; in_re = val[1][13][b];
      @(negedge clk);
    end
    in_valid = 0;
    lat = 0;
    while (!grid_ready && lat < 100) begin @(negedge clk); lat++; end
    checks++; if (lat != 14) begin failures++; $display("second transfer %0d", lat); end
    check_grid(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
