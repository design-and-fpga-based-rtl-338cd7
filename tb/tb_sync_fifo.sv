// tb_sync_fifo: random pushes and pops compared with a queue model,
// including full and empty flags.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en, rd_en, full, empty;
  logic [31:0] wr_data, rd_data;
  logic [4:0] count;

  sync_fifo #(.W(32), .DEPTH(16)) dut (.clk, .rst_n, .wr_en, .wr_data, .full, .rd_en, .rd_data, .empty, .count);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] q [$];
  int saw_full = 0;
  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (full != (q.size() == 16) || empty != (q.size() == 0) || count != 5'(q.size())) begin
        failures++; $display("flags size=%0d full=%0d empty=%0d", q.size(), full, empty);
      end
      if (full) saw_full++;
      wr_en = !full && ($urandom_range(0, 9) < ((i / 500) % 2 ? 3 : 7));
      rd_en = !empty && ($urandom_range(0, 9) < ((i / 500) % 2 ? 7 : 3));
      wr_data = $urandom;
      if (rd_en) begin
        checks++;
        if (rd_data !== q[0]) begin failures++; $display("data"); end
        void'(q.pop_front());
      end
      if (wr_en) q.push_back(wr_data);
    end
    checks++; if (saw_full == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
