// tb_nbiot_ue_top: end-to-end test of the user-equipment baseband at full
// size (no parameter overrides).
//
// Transmitter: a 40-bit transport block (K = 64, QPP f1 = 7, f2 = 16) is
// coded into G = 288 bits over 2 slots, QPSK on 12 subcarriers; reference
// symbols are inserted at symbol 3 of each slot. Checked: 1920 output
// samples for 14 SC-FDMA symbols (128 samples, CP 10 on the first symbol
// of a slot and 9 otherwise) and every stage's activity.
// Receiver: the testbench builds a downlink subframe on its own: CRC24A,
// tail-biting convolutional coding, rate matching to E = 320, Gold-sequence
// scrambling, QPSK, resource grid with NRS, a flat complex channel, a
// 16-point inverse DFT and a carrier frequency offset. The decoded bits
// must equal the transport block with its CRC, the CRC check must pass
// and the decoder must report a tail-biting path.
// NPSS detection: three 10 ms frames at full rate, the last two containing
// an 11-symbol code-covered sequence, must give a detection at the
// inserted position (within the 16-sample reduction).
// Every mechanism is counted; one that never occurs is a failure.
module tb_nbiot_ue_top;
  import nbiot_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  localparam real PI = 3.141592653589793;

  // ---------------- DUT
  logic tx_start, tx_qpsk, tx_mode_3k75, tx_first_of_slot, tx_in_valid, tx_in_bit, tx_in_last, tx_in_ready;
  logic [11:0] tx_k_len, tx_f1, tx_f2, tx_g_len;
  logic [1:0] tx_rv;
  logic [4:0] tx_n_slots;
  logic [30:0] tx_c_init, rx_c_init;
  logic [3:0] tx_m_sc, tx_sc_start;
  logic tx_dmrs_sel, tx_dmrs_valid, tx_dmrs_ready, tx_out_valid, tx_out_last, tx_busy;
  logic [15:0] tx_dmrs_re, tx_dmrs_im, tx_out_re, tx_out_im;
  logic rx_start, rx_clear, rx_in_valid, rx_out_valid, rx_out_bit, rx_done, rx_crc_ok, rx_tail_biting, rx_busy;
  logic [11:0] rx_k_len;
  logic [15:0] rx_e_len, rx_phase_inc, rx_in_re, rx_in_im;
  logic [8:0] rx_cell_id;
  logic [4:0] rx_ns0;
  logic cs_in_valid, cs_peak_valid, cs_peak_found;
  logic [15:0] cs_in_re, cs_in_im;
  logic [43:0] cs_threshold, cs_peak_metric, cs_peak_re, cs_peak_im;
  logic [14:0] cs_npss_start;

  nbiot_ue_top dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- mechanism counters
  int n_crc_tx, n_turbo, n_rm, n_ci, n_scr, n_mod, n_dft, n_dmrs, n_ifft, n_long_cp, n_tx_smp;
  int n_cfo, n_fft, n_grid, n_est, n_nrs, n_eq, n_dscr, n_rdm, n_vit, n_crc_rx, n_cs;
  int dmrs_cnt;    // mapper inputs accepted so far
  int frame_cnt;   // IFFT frames so far
  always @(posedge clk) if (rst_n) begin
    if (dut.crc_t_valid) n_crc_tx++;
    if (dut.te_valid) n_turbo++;
    if (dut.rm_valid) n_rm++;
    if (dut.ci_valid && dut.sc_in_ready) n_ci++;
    if (dut.sc_valid && dut.mm_in_ready) n_scr++;
    if (dut.mm_valid && dut.dft_in_ready) n_mod++;
    if (dut.dft_valid && dut.re_in_ready && !tx_dmrs_sel) n_dft++;
    if (tx_dmrs_valid && tx_dmrs_ready) n_dmrs++;
    if (dut.re_in_valid && dut.re_in_ready) dmrs_cnt++;
    if (dut.if_valid) begin n_ifft++; if (tx_first_of_slot) n_long_cp++; end
    if (tx_out_valid) n_tx_smp++;
    if (dut.cfo_valid) n_cfo++;
    if (dut.fft_valid) n_fft++;
    if (dut.grid_ready) n_grid++;
    if (dut.ce_done) n_est++;
    if (dut.nr_valid) n_nrs++;
    if (dut.eq_valid) n_eq++;
    if (dut.ds_valid) n_dscr++;
    if (dut.rd_valid) n_rdm++;
    if (rx_out_valid) n_vit++;
    if (rx_done) n_crc_rx++;
    if (cs_peak_valid && cs_peak_found) n_cs++;
  end
  // reference symbols at symbol 3 of each 7-symbol slot; long CP on symbol 0
  assign tx_dmrs_sel      = ((dmrs_cnt / 12) % 7) == 3;
  assign tx_dmrs_valid    = tx_dmrs_sel;
  assign tx_dmrs_re       = 16'(AMP);
  assign tx_dmrs_im       = 16'(AMP);
  assign tx_first_of_slot = (n_ifft % 7) == 0;

  // ---------------- transmitter stimulus
  task automatic run_tx();
    tx_k_len = 64; tx_f1 = 7; tx_f2 = 16; tx_rv = 0; tx_g_len = 288; tx_n_slots = 2;
    tx_c_init = 31'h1234567; tx_qpsk = 1; tx_m_sc = 12; tx_sc_start = 0; tx_mode_3k75 = 0;
    @(negedge clk); tx_start = 1; @(negedge clk); tx_start = 0;
    for (int i = 0; i < 40; i++) begin
      tx_in_valid = 1; tx_in_bit = 1'($urandom); tx_in_last = (i == 39);
      while (!tx_in_ready) @(negedge clk);
      @(negedge clk);
    end
    tx_in_valid = 0; tx_in_last = 0;
    while (n_tx_smp < 1920) @(negedge clk);
    repeat (300) @(negedge clk);
    checks++; if (n_tx_smp != 1920) begin failures++; $display("tx samples %0d", n_tx_smp); end
    checks++; if (n_crc_tx != 64) begin failures++; $display("crc out %0d", n_crc_tx); end
    checks++; if (n_turbo != 68) begin failures++; $display("turbo out %0d", n_turbo); end
    checks++; if (n_rm != 288 || n_ci != 288 || n_scr != 288) begin failures++; $display("bits %0d %0d %0d", n_rm, n_ci, n_scr); end
    checks++; if (n_mod != 144 || n_dft != 144 || n_dmrs != 24) begin failures++; $display("syms %0d %0d %0d", n_mod, n_dft, n_dmrs); end
    checks++; if (n_ifft != 14 || n_long_cp != 2) begin failures++; $display("frames %0d long %0d", n_ifft, n_long_cp); end
  endtask

  // ---------------- receiver reference model
  localparam int TBS = 40, K = 64, E = 320, CELL = 7;
  bit a [K];                 // transport block + CRC
  logic [2:0] d [K];
  bit e [E];
  bit x1 [E + 1700], x2 [E + 1700];
  real gr [14][12], gi [14][12];
  real h_re = 0.55, h_im = -0.35;
  int rx_got [$];

  function automatic void gold(input logic [30:0] ci, input int n);
    for (int i = 0; i < 31; i++) begin x1[i] = (i == 0); x2[i] = ci[i]; end
    for (int i = 0; i < n + 1600; i++) begin
      x1[i+31] = x1[i+3] ^ x1[i];
      x2[i+31] = x2[i+3] ^ x2[i+2] ^ x2[i+1] ^ x2[i];
    end
  endfunction

  task automatic build_rx();
    logic [23:0] crc = '0;
    localparam logic [6:0] G [3] = '{7'o133, 7'o171, 7'o165};
    int w [3*K];
    int idx;
    for (int i = 0; i < TBS; i++) begin
      a[i] = 1'($urandom);
      crc = {crc[22:0], 1'b0} ^ ((crc[23] ^ a[i]) ? CRC24_POLY : 24'h0);
    end
    for (int i = 0; i < 24; i++) a[TBS + i] = crc[23 - i];
    for (int i = 0; i < K; i++)
      for (int g = 0; g < 3; g++) begin
        automatic bit x = 0;
        for (int j = 0; j <= 6; j++) x ^= G[g][6 - j] & a[(i - j + K) % K];
        d[i][g] = x;
      end
    // sub-block interleaving (2 rows, no dummy bits), circular buffer
    for (int s = 0; s < 3; s++)
      for (int c = 0; c < 32; c++)
        for (int r = 0; r < 2; r++) begin
          automatic int pc = 0;
          for (int b = 0; b < 5; b++) pc |= ((c >> b) & 1) << (4 - b);
          w[s * 64 + c * 2 + r] = d[(pc ^ 1) + 32 * r][s];
        end
    gold(rx_c_init, E);
    for (int i = 0; i < E; i++) e[i] = bit'(w[i % (3 * K)]) ^ x1[i + 1600] ^ x2[i + 1600];
    // grid: NRS (ns = 0, 1) and data REs in read-out order
    idx = 0;
    for (int sl = 0; sl < 2; sl++)
      for (int l = 5; l < 7; l++) begin
        automatic longint ci = (longint'(1024) * (7 * (sl + 1) + l + 1) * (2 * CELL + 1) + 2 * CELL + 1) % (longint'(1) << 31);
        automatic int base = (CELL % 6 + ((l == 6) ? 3 : 0)) % 6;
        gold(31'(ci), 4);
        for (int m = 0; m < 2; m++) begin
          gr[7 * sl + l][6 * m + base] = ((x1[1600+2*m] ^ x2[1600+2*m]) ? -1.0 : 1.0) * AMP;
          gi[7 * sl + l][6 * m + base] = ((x1[1601+2*m] ^ x2[1601+2*m]) ? -1.0 : 1.0) * AMP;
        end
      end
    for (int s = 0; s < 14; s++)
      for (int k = 0; k < 12; k++) begin
        automatic int l = s % 7;
        automatic bit nrs = (l == 5 && k % 6 == CELL % 6) || (l == 6 && k % 6 == (CELL + 3) % 6);
        if (!nrs) begin
          gr[s][k] = e[2 * idx] ? -AMP : AMP;
          gi[s][k] = e[2 * idx + 1] ? -AMP : AMP;
          idx++;
        end
      end
    checks++; if (idx != 160) begin failures++; $display("model REs %0d", idx); end
  endtask

  task automatic run_rx();
    int n;
    rx_k_len = K; rx_e_len = E; rx_c_init = 31'h0ABCDEF; rx_cell_id = CELL; rx_ns0 = 0; rx_phase_inc = 16'd300;
    build_rx();
    @(negedge clk); rx_start = 1; rx_clear = 1; @(negedge clk); rx_start = 0; rx_clear = 0;
    repeat (1700) @(negedge clk);
    n = 0;
    for (int s = 0; s < 15; s++)
      for (int t = 0; t < 16; t++) begin
        automatic real xr = 0.0, xi = 0.0, ph, cr, ci2;
        if (s < 14)
          for (int k = 0; k < 12; k++) begin
            automatic int b = (k < 6) ? k + 10 : k - 6;
            automatic real ar = 2.0 * PI * b * t / 16.0;
            automatic real yr = h_re * gr[s][k] - h_im * gi[s][k];
            automatic real yi = h_re * gi[s][k] + h_im * gr[s][k];
            xr += (yr * $cos(ar) - yi * $sin(ar)) / 8.0;
            xi += (yr * $sin(ar) + yi * $cos(ar)) / 8.0;
          end
        ph = 2.0 * PI * 300.0 * n / 65536.0;
        cr = xr * $cos(ph) - xi * $sin(ph);
        ci2 = xr * $sin(ph) + xi * $cos(ph);
        rx_in_valid = 1; rx_in_re = 16'(int'(cr)); rx_in_im = 16'(int'(ci2));
        @(negedge clk); rx_in_valid = 0; @(negedge clk);
        n++;
      end
    while (!rx_done) @(negedge clk);
    checks++; if (!rx_crc_ok) begin failures++; $display("CRC check failed"); end
    @(negedge clk);
    checks++; if (!rx_tail_biting) begin failures++; $display("not tail-biting"); end
    checks++; if (rx_got.size() != K) begin failures++; $display("rx bits %0d", rx_got.size()); end
    for (int i = 0; i < K && i < rx_got.size(); i++) begin
      checks++; if (rx_got[i] != a[i]) begin failures++; if (failures < 10) $display("rx bit %0d", i); end
    end
    checks++; if (n_nrs != 160 || n_rdm != K || n_grid != 1) begin failures++; $display("nrs %0d rdm %0d grid %0d", n_nrs, n_rdm, n_grid); end
  endtask
  always @(posedge clk) if (rst_n && rx_out_valid) rx_got.push_back(rx_out_bit);

  // ---------------- NPSS stimulus
  task automatic run_cs();
    localparam int NS = 137, FRAME = 19200, P = 5000;
    localparam int S [11] = '{1, 1, 1, 1, -1, -1, 1, 1, 1, -1, 1};
    real br [NS], bi [NS];
    cs_threshold = 44'd20000000;
    for (int i = 0; i < NS; i++) begin
      automatic real ang = 2.0 * PI * real'($urandom_range(0, 999)) / 1000.0;
      br[i] = 4000.0 * $cos(ang); bi[i] = 4000.0 * $sin(ang);
    end
    for (int f = 0; f < 3; f++)
      for (int n = 0; n < FRAME; n++) begin
        automatic real xr = real'($urandom_range(0, 600)) - 300.0;
        automatic real xi = real'($urandom_range(0, 600)) - 300.0;
        if (f > 0 && n >= P && n < P + 11 * NS) begin
          xr += S[(n - P) / NS] * br[(n - P) % NS];
          xi += S[(n - P) / NS] * bi[(n - P) % NS];
        end
        cs_in_valid = 1; cs_in_re = 16'(int'(xr)); cs_in_im = 16'(int'(xi));
        @(negedge clk);
        if (cs_peak_valid) begin
          checks++;
          if (f == 0 && cs_peak_found) begin failures++; $display("false NPSS detection"); end
          if (f == 2 && (!cs_peak_found || int'(cs_npss_start) < P - 16 || int'(cs_npss_start) > P + 16)) begin
            failures++; $display("NPSS found %0d at %0d", cs_peak_found, cs_npss_start);
          end
        end
      end
    cs_in_valid = 0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    tx_start = 0; tx_in_valid = 0; tx_in_bit = 0; tx_in_last = 0;
    rx_start = 0; rx_clear = 0; rx_in_valid = 0; rx_in_re = 0; rx_in_im = 0;
    cs_in_valid = 0; cs_in_re = 0; cs_in_im = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    fork
      run_tx();
      run_rx();
      run_cs();
    join
    begin
      automatic int cnt [22] = '{n_crc_tx, n_turbo, n_rm, n_ci, n_scr, n_mod, n_dft, n_dmrs, n_ifft, n_long_cp, n_tx_smp,
                       n_cfo, n_fft, n_grid, n_est, n_nrs, n_eq, n_dscr, n_rdm, n_vit, n_crc_rx, n_cs};
      for (int i = 0; i < 22; i++) begin
        checks++; if (cnt[i] == 0) begin failures++; $display("mechanism %0d never occurred", i); end
      end
      $display("tx: crc %0d turbo %0d rm %0d ci %0d scr %0d mod %0d dft %0d dmrs %0d ifft %0d longcp %0d smp %0d",
               n_crc_tx, n_turbo, n_rm, n_ci, n_scr, n_mod, n_dft, n_dmrs, n_ifft, n_long_cp, n_tx_smp);
      $display("rx: cfo %0d fft %0d grid %0d est %0d nrs %0d eq %0d dscr %0d rdm %0d vit %0d crc %0d npss %0d",
               n_cfo, n_fft, n_grid, n_est, n_nrs, n_eq, n_dscr, n_rdm, n_vit, n_crc_rx, n_cs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
