// tb_gold_seq: compares the Gold sequence with the 3GPP recursion
// evaluated directly on arrays, and checks the 1600-clock initialisation.
module tb_gold_seq;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic init, advance, ready, c;
  logic [30:0] c_init;

  gold_seq dut (.clk, .rst_n, .init, .c_init, .advance, .ready, .c);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam int N = 300;
  bit x1 [N + 1600 + 31];
  bit x2 [N + 1600 + 31];

  initial begin
    init = 0; advance = 0; c_init = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int trial = 0; trial < 3; trial++) begin
      automatic int wait_cyc = 0;
      c_init = (trial == 0) ? 31'h1234 : 31'($urandom);
      for (int i = 0; i < 31; i++) begin x1[i] = (i == 0); x2[i] = c_init[i]; end
      for (int n = 0; n < N + 1600; n++) begin
        x1[n+31] = x1[n+3] ^ x1[n];
        x2[n+31] = x2[n+3] ^ x2[n+2] ^ x2[n+1] ^ x2[n];
      end
      @(negedge clk); init = 1; @(negedge clk); init = 0;
      while (!ready) begin @(negedge clk); wait_cyc++; end
      checks++;
      if (wait_cyc < 1599 || wait_cyc > 1601) begin failures++; $display("init took %0d", wait_cyc); end
      for (int n = 0; n < N; n++) begin
        checks++;
        if (c !== (x1[n+1600] ^ x2[n+1600])) begin failures++; if (failures < 5) $display("c(%0d) wrong", n); end
        advance = 1; @(negedge clk);
        if (n % 7 == 3) begin advance = 0; @(negedge clk); end
      end
      advance = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
