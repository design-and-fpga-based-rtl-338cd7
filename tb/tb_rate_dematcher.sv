// tb_rate_dematcher: a reference model of the convolutional-code rate
// matching (sub-block interleaving of the three streams, circular buffer,
// dummy bits skipped, repetition or puncturing) produces E bits from random
// triplets; the de-matcher must return the triplets. Repetition cases add
// bit errors in one copy, which the combining must outvote. The output
// length (D clocks) and the clear time are checked.
module tb_rate_dematcher;
  import nbiot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int KPI = 256;
  logic start, in_valid, in_bit, in_ready, out_valid, out_last, busy;
  logic [$clog2(KPI+1)-1:0] d_len;
  logic [15:0] e_len;
  logic [2:0] out_d;

  rate_dematcher #(.KPI_MAX(KPI)) dut (.clk, .rst_n, .start, .d_len, .e_len, .in_valid, .in_bit, .in_ready,
                    .out_valid, .out_d, .out_last, .busy);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [2:0] d [KPI];
  int w [3*KPI];       // -1 = dummy, else stream bit
  int wsrc [3*KPI];     // index 3*i+s of the bit at each buffer position
  bit seen [3*KPI];     // punctured bits are never received
  bit e [$];
  logic [2:0] got [$];
  int lasts;
  always @(posedge clk) if (rst_n && out_valid) begin got.push_back(out_d); if (out_last) lasts++; end

  function automatic int pconv(int c);
    int b = 0;
    for (int i = 0; i < 5; i++) b |= ((c >> i) & 1) << (4 - i);
    return b ^ 1;
  endfunction

  initial begin
    int dl, el, rows, nd, kw, pos, errs;
    start = 0; in_valid = 0; in_bit = 0; d_len = 0; e_len = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      case (t)
        0: begin dl = 64; el = 320; end
        1: begin dl = 40; el = 100; end
        2: begin dl = 100; el = 1200; end
        3: begin dl = 256; el = 768; end
        default: begin dl = $urandom_range(20, 200); el = $urandom_range(3 * dl, 8 * dl); end
      endcase
      rows = (dl + 31) / 32; nd = rows * 32 - dl; kw = 3 * rows * 32;
      for (int i = 0; i < dl; i++) d[i] = 3'($urandom);
      for (int s = 0; s < 3; s++)
        for (int j = 0; j < 32; j++)
          for (int r = 0; r < rows; r++) begin
            automatic int a = pconv(j) + 32 * r;
            w[s * rows * 32 + j * rows + r] = (a < nd) ? -1 : int'(d[a - nd][s]);
            wsrc[s * rows * 32 + j * rows + r] = 3 * (a - nd) + s;
          end
      e.delete(); pos = 0;
      for (int i = 0; i < 3 * KPI; i++) seen[i] = 0;
      while (e.size() < el) begin
        if (w[pos] >= 0) begin e.push_back(bit'(w[pos])); seen[wsrc[pos]] = 1; end
        pos = (pos + 1) % kw;
      end
      // corrupt some bits of the first copy when every bit is sent at least 3 times
      errs = 0;
      if (el >= 9 * dl) for (int i = 0; i < 3 * dl; i += 7) begin e[i] = !e[i]; errs++; end
      got.delete(); lasts = 0;
      @(negedge clk); start = 1; d_len = ($bits(d_len))'(dl); e_len = 16'(el);
      @(negedge clk); start = 0;
      begin
        automatic int c0 = 0;
        while (!in_ready) begin @(negedge clk); c0++; end
        checks++; if (c0 < rows * 32 || c0 > rows * 32 + nd + 2) begin failures++; $display("clear took %0d rows %0d nd %0d", c0, rows, nd); end
      end
      for (int i = 0; i < el; i++) begin
        in_valid = 1; in_bit = e[i];
        while (!(in_ready && in_valid)) @(negedge clk);
        @(negedge clk);
        if ($urandom_range(0, 5) == 0) begin in_valid = 0; @(negedge clk); end
      end
      in_valid = 0;
      while (busy) @(negedge clk);
      @(negedge clk);
      checks++; if (got.size() != dl || lasts != 1) begin failures++; $display("t=%0d out %0d last %0d", t, got.size(), lasts); end
      for (int i = 0; i < dl && i < got.size(); i++) begin
        for (int s = 0; s < 3; s++) if (seen[3 * i + s]) begin
        checks++; if (got[i][s] != d[i][s]) begin failures++; if (failures < 8) $display("t=%0d i=%0d got %b exp %b", t, i, got[i], d[i]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
