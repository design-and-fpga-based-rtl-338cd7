// tb_channel_interleaver: writes G random bits, reads them back under
// random output stalls, and checks the row-in / column-out order
// out[c*N_row + r] = in[r*N_col + c].
module tb_channel_interleaver;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, in_valid, in_bit, in_ready, out_valid, out_bit, out_last, out_ready, busy;
  logic [4:0] n_slots;
  logic [11:0] g_len;

  channel_interleaver dut (.clk, .rst_n, .start, .n_slots, .g_len, .in_valid, .in_bit, .in_ready,
    .out_valid, .out_bit, .out_last, .out_ready, .busy);

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic inb [2880];
  logic got [$];
  int lastpos;
  always @(posedge clk) if (out_valid && out_ready) begin
    got.push_back(out_bit);
    if (out_last) lastpos = got.size();
  end

  initial begin
    int slots [4] = '{2, 4, 8, 16};
    int rows  [4] = '{8, 10, 30, 30};
    start = 0; in_valid = 0; in_bit = 0; n_slots = 0; g_len = 0; out_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      automatic int ncol = 6 * slots[t], nrow = rows[t], G = ncol * nrow;
      for (int i = 0; i < G; i++) inb[i] = 1'($urandom);
      got.delete(); lastpos = -1;
      @(negedge clk); start = 1; n_slots = 5'(slots[t]); g_len = 12'(G);
      @(negedge clk); start = 0;
      for (int i = 0; i < G; i++) begin
        in_valid = 1; in_bit = inb[i]; @(negedge clk);
      end
      in_valid = 0;
      while (busy) begin out_ready = ($urandom_range(0, 3) != 0); @(negedge clk); end
      out_ready = 0;
      checks++;
      if (got.size() != G || lastpos != G) begin failures++; $display("G=%0d got %0d last at %0d", G, got.size(), lastpos); end
      for (int c = 0; c < ncol; c++)
        for (int r = 0; r < nrow; r++) begin
          checks++;
          if (c * nrow + r >= got.size() || got[c * nrow + r] !== inb[r * ncol + c]) begin
            failures++; if (failures < 8) $display("G=%0d c=%0d r=%0d", G, c, r);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
