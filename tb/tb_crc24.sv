// tb_crc24: checks the CRC24A generator against a long-division reference
// and the checker on correct and corrupted blocks.
module tb_crc24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, in_valid, in_bit, in_last, in_ready, out_valid, out_bit, out_last, done, crc_ok;
  logic c_start, c_valid, c_bit, c_last, c_ready, c_ov, c_ob, c_ol, c_done, c_ok;

  crc24 #(.CHECK(1'b0)) dut (.clk, .rst_n, .start, .in_valid, .in_bit, .in_last, .in_ready,
    .out_valid, .out_bit, .out_last, .done, .crc_ok);
  crc24 #(.CHECK(1'b1)) chk (.clk, .rst_n, .start(c_start), .in_valid(c_valid), .in_bit(c_bit),
    .in_last(c_last), .in_ready(c_ready), .out_valid(c_ov), .out_bit(c_ob), .out_last(c_ol),
    .done(c_done), .crc_ok(c_ok));

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference: remainder of data(D) * D^24 divided by the generator
  function automatic logic [23:0] ref_crc(input logic data [], input int n);
    logic [24:0] g = 25'h1864CFB;
    logic msg [];
    logic [23:0] rem;
    msg = new[n + 24];
    for (int i = 0; i < n + 24; i++) msg[i] = (i < n) ? data[i] : 1'b0;
    for (int i = 0; i < n; i++)
      if (msg[i]) for (int j = 0; j < 25; j++) msg[i+j] ^= g[24-j];
    for (int j = 0; j < 24; j++) rem[23-j] = msg[n+j];
    return rem;
  endfunction

  logic data [];
  logic outb [$];
  always @(posedge clk) if (out_valid) outb.push_back(out_bit);
  initial begin
    start = 0; in_valid = 0; in_bit = 0; in_last = 0;
    c_start = 0; c_valid = 0; c_bit = 0; c_last = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int trial = 0; trial < 4; trial++) begin
      automatic int n = 16 + trial * 40;
      logic [23:0] exp_crc;
      int lat;
      data = new[n];
      foreach (data[i]) data[i] = 1'($urandom);
      exp_crc = ref_crc(data, n);
      outb.delete();
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int i = 0; i < n; i++) begin
        in_valid = 1; in_bit = data[i]; in_last = (i == n - 1);
        @(negedge clk);
      end
      in_valid = 0; in_last = 0;
      lat = 0;
      while (!done) begin
        @(negedge clk); lat++;
      end
      @(negedge clk);
      checks++;
      if (outb.size() != n + 24) begin failures++; $display("len %0d", outb.size()); end
      checks++;
      if (lat != 24) begin failures++; $display("append cycles %0d", lat); end
      for (int j = 0; j < 24; j++) begin
        checks++;
        if (outb[n + j] !== exp_crc[23-j]) begin failures++; $display("crc bit %0d", j); end
      end
      // checker on intact and corrupted copies
      for (int corrupt = 0; corrupt < 2; corrupt++) begin
        automatic int flip = $urandom_range(0, n + 23);
        @(negedge clk); c_start = 1; @(negedge clk); c_start = 0;
        for (int i = 0; i < n + 24; i++) begin
          c_valid = 1; c_bit = outb[i] ^ (corrupt == 1 && i == flip); c_last = (i == n + 23);
          @(negedge clk);
        end
        c_valid = 0; c_last = 0;
        checks++;
        if (c_ok !== (corrupt == 0)) begin failures++; $display("check corrupt=%0d ok=%0d", corrupt, c_ok); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
