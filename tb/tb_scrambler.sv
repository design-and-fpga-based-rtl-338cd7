// tb_scrambler: scrambles random bits with stalls and compares with the
// Gold sequence worked out from the 3GPP recursion; checks c_init use.
module tb_scrambler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic init, ready, in_valid, in_bit, in_ready, out_valid, out_bit, out_ready;
  logic [30:0] c_init;

  scrambler dut (.clk, .rst_n, .init, .c_init, .ready, .in_valid, .in_bit, .in_ready,
    .out_valid, .out_bit, .out_ready);

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam int N = 400;
  bit x1 [N + 1600 + 31];
  bit x2 [N + 1600 + 31];

  initial begin
    init = 0; in_valid = 0; in_bit = 0; out_ready = 1; c_init = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int trial = 0; trial < 3; trial++) begin
      // n_RNTI*2^14 + q*2^13 + (ns/2)*2^9 + cellid
      automatic int rnti = $urandom_range(0, 65535), q = trial & 1, ns = $urandom_range(0, 19), cellid = $urandom_range(0, 503);
      automatic int sent = 0;
      c_init = 31'(rnti * (1 << 14) + q * (1 << 13) + (ns / 2) * (1 << 9) + cellid);
      for (int i = 0; i < 31; i++) begin x1[i] = (i == 0); x2[i] = c_init[i]; end
      for (int n = 0; n < N + 1600; n++) begin
        x1[n+31] = x1[n+3] ^ x1[n];
        x2[n+31] = x2[n+3] ^ x2[n+2] ^ x2[n+1] ^ x2[n];
      end
      @(negedge clk); init = 1; @(negedge clk); init = 0;
      checks++; if (ready) begin failures++; $display("ready during init"); end
      while (sent < N) begin
        in_valid = ($urandom_range(0, 3) != 0);
        out_ready = ($urandom_range(0, 4) != 0);
        in_bit = 1'($urandom);
        #1;
        if (in_valid && in_ready) begin
          checks++;
          if (!out_valid || out_bit !== (in_bit ^ x1[sent+1600] ^ x2[sent+1600])) begin
            failures++; if (failures < 5) $display("bit %0d wrong", sent);
          end
          sent++;
        end
        @(negedge clk);
      end
      in_valid = 0; out_ready = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
