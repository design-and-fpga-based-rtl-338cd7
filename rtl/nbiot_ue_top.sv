// nbiot_ue_top: NB-IoT user-equipment baseband with the NPUSCH transmitter,
// the NPDSCH receiver and the NPSS detector.
//
// Transmitter (one transport block per tx_start):
//   crc24 -> turbo_encoder -> rate_matcher -> channel_interleaver ->
//   scrambler -> modulation_mapper -> dft_precoder -> ul_re_mapper ->
//   ifft16 -> interpolator -> tx_out_*
// tx_start clears/arms every stage with the configuration ports, which must
// stay stable until the block has left the chain. The transport block bits
// (tx_in_*) enter with a valid/ready handshake; the CRC is appended by the
// chain. Every stage after the channel interleaver is flow-controlled by
// ready signals, so the chain runs at the pace of the interpolator (one
// output sample per clock, 16*U + CP clocks per SC-FDMA symbol). The
// reference-signal symbols of the uplink slot enter through tx_dmrs_*:
// while tx_dmrs_sel is high the resource element mapper takes its
// M_sc symbols from there instead of from the DFT precoder.
//
// Receiver (one transport block per rx_start, one subframe per rx_clear):
//   rx_in_* (16 samples per OFDM symbol, CP removed) -> cfo_corrector ->
//   sync_fifo -> fft16_sdf -> re_demapper -> channel_estimator /
//   nrs_removal -> equalizer -> symbol_demapper -> descrambler ->
//   bit FIFO -> rate_dematcher -> viterbi_decoder -> crc24 (check)
// When a subframe grid is complete the channel estimator runs (ns0 =
// rx_ns0), then the NRS removal reads the grid out, equalising and
// demapping each element on the way. The descrambler must have been
// initialised (rx_start, 1600 clocks) before the first subframe is
// complete. After rx_e_len bits the de-matcher releases K triplets to the
// Viterbi decoder, whose output goes through the CRC check:
// rx_out_* carries the K decoded bits (TB and CRC), rx_done/rx_crc_ok the
// result. The bit FIFO absorbs the de-matcher's pauses at dummy positions.
//
// NPSS detection (coarse_sync) runs on its own full-rate input cs_in_*.
//
// Signals named *_valid are one-clock qualifiers; tx_start, rx_start,
// rx_clear are one-clock pulses. The assertions state the rules that a
// flow-control-free link between two stages relies on.
module nbiot_ue_top import nbiot_pkg::*; #(
  parameter int KMAX = 2560,   // largest code block K (TBS + 24)
  parameter int GMAX = 2880,   // largest number of coded bits G
  parameter int RMAX = 128     // turbo sub-block interleaver rows
) (
  input  logic        clk,
  input  logic        rst_n,
  // ---------------- transmitter configuration and data
  input  logic        tx_start,
  input  logic [11:0] tx_k_len,     // K = TBS + 24
  input  logic [11:0] tx_f1,        // QPP interleaver coefficients for K
  input  logic [11:0] tx_f2,
  input  logic [1:0]  tx_rv,        // redundancy version
  input  logic [11:0] tx_g_len,     // coded bits G = E
  input  logic [4:0]  tx_n_slots,   // slots of the resource unit
  input  logic [30:0] tx_c_init,    // scrambling initialisation
  input  logic        tx_qpsk,      // 1: QPSK, 0: BPSK
  input  logic [3:0]  tx_m_sc,      // allocated subcarriers 1, 3, 6, 12
  input  logic [3:0]  tx_sc_start,  // first allocated subcarrier
  input  logic        tx_mode_3k75, // 3.75 kHz subcarrier spacing
  input  logic        tx_first_of_slot,
  input  logic        tx_in_valid,
  input  logic        tx_in_bit,
  input  logic        tx_in_last,
  output logic        tx_in_ready,
  input  logic        tx_dmrs_sel,
  input  logic        tx_dmrs_valid,
  input  logic [15:0] tx_dmrs_re,
  input  logic [15:0] tx_dmrs_im,
  output logic        tx_dmrs_ready,
  output logic        tx_out_valid,
  output logic [15:0] tx_out_re,
  output logic [15:0] tx_out_im,
  output logic        tx_out_last,  // last sample of an SC-FDMA symbol
  output logic        tx_busy,      // coding stages still hold the block
  // ---------------- receiver configuration and data
  input  logic        rx_start,
  input  logic [11:0] rx_k_len,     // K = TBS + 24
  input  logic [15:0] rx_e_len,     // received coded bits E
  input  logic [30:0] rx_c_init,    // descrambling initialisation
  input  logic [8:0]  rx_cell_id,
  input  logic [4:0]  rx_ns0,       // first slot of the current subframe
  input  logic [15:0] rx_phase_inc, // CFO: phase step per sample (2^16 = 2 pi)
  input  logic        rx_clear,
  input  logic        rx_in_valid,
  input  logic [15:0] rx_in_re,
  input  logic [15:0] rx_in_im,
  output logic        rx_out_valid,
  output logic        rx_out_bit,
  output logic        rx_done,
  output logic        rx_crc_ok,
  output logic        rx_tail_biting,
  output logic        rx_busy,      // de-matching or decoding in progress
  // ---------------- NPSS detection
  input  logic        cs_in_valid,
  input  logic [15:0] cs_in_re,
  input  logic [15:0] cs_in_im,
  input  logic [43:0] cs_threshold,
  output logic        cs_peak_valid,
  output logic        cs_peak_found,
  output logic [14:0] cs_npss_start,
  output logic [43:0] cs_peak_metric,
  output logic [43:0] cs_peak_re,
  output logic [43:0] cs_peak_im
);
  // =============================== transmitter
  logic crc_t_valid, crc_t_bit, crc_t_last, crc_t_done, crc_t_ok;
  logic te_valid, te_last, te_busy, te_in_ready;
  logic [2:0] te_d;
  logic rm_valid, rm_bit, rm_last, rm_busy;
  logic ci_in_ready, ci_valid, ci_bit, ci_last, ci_busy;
  logic sc_ready, sc_in_ready, sc_valid, sc_bit;
  logic mm_in_ready, mm_valid;
  cplx_t mm_sym;
  logic dft_in_ready, dft_valid, dft_last;
  cplx_t dft_sym;
  logic re_in_valid, re_in_ready, re_valid, re_out_ready;
  cplx_t re_in_sym;
  cplx_t re_bins [16];
  logic if_valid, if_busy;
  cplx_t if_smp [16];
  logic ip_in_ready;
  cplx_t ip_smp;

  crc24 #(.CHECK(1'b0)) u_crc_tx (
    .clk, .rst_n, .start(tx_start), .in_valid(tx_in_valid), .in_bit(tx_in_bit), .in_last(tx_in_last),
    .in_ready(tx_in_ready), .out_valid(crc_t_valid), .out_bit(crc_t_bit), .out_last(crc_t_last),
    .done(crc_t_done), .crc_ok(crc_t_ok));

  turbo_encoder #(.KMAX(KMAX)) u_turbo (
    .clk, .rst_n, .start(tx_start), .k_len(tx_k_len), .f1(tx_f1), .f2(tx_f2),
    .in_valid(crc_t_valid), .in_bit(crc_t_bit), .in_ready(te_in_ready),
    .out_valid(te_valid), .out_d(te_d), .out_last(te_last), .busy(te_busy));

  rate_matcher #(.RMAX(RMAX)) u_rm (
    .clk, .rst_n, .start(tx_start), .d_len(13'(tx_k_len) + 13'd4), .rv(tx_rv), .e_len(16'(tx_g_len)),
    .in_valid(te_valid), .in_d(te_d), .out_valid(rm_valid), .out_bit(rm_bit), .out_last(rm_last),
    .busy(rm_busy));

  channel_interleaver #(.GMAX(GMAX)) u_ci (
    .clk, .rst_n, .start(tx_start), .n_slots(tx_n_slots), .g_len(tx_g_len),
    .in_valid(rm_valid), .in_bit(rm_bit), .in_ready(ci_in_ready),
    .out_valid(ci_valid), .out_bit(ci_bit), .out_last(ci_last), .out_ready(sc_in_ready), .busy(ci_busy));

  scrambler u_scr (
    .clk, .rst_n, .init(tx_start), .c_init(tx_c_init), .ready(sc_ready),
    .in_valid(ci_valid), .in_bit(ci_bit), .in_ready(sc_in_ready),
    .out_valid(sc_valid), .out_bit(sc_bit), .out_ready(mm_in_ready));

  modulation_mapper u_mod (
    .clk, .rst_n, .start(tx_start), .qpsk(tx_qpsk), .in_valid(sc_valid), .in_bit(sc_bit),
    .in_ready(mm_in_ready), .out_valid(mm_valid), .out_sym(mm_sym), .out_ready(dft_in_ready));

  dft_precoder u_dft (
    .clk, .rst_n, .m_sc(tx_m_sc), .in_valid(mm_valid), .in_sym(mm_sym), .in_ready(dft_in_ready),
    .out_valid(dft_valid), .out_sym(dft_sym), .out_last(dft_last), .out_ready(re_in_ready && !tx_dmrs_sel));

  // reference-signal symbols share the mapper input with the data symbols
  assign re_in_valid   = tx_dmrs_sel ? tx_dmrs_valid : dft_valid;
  assign re_in_sym     = tx_dmrs_sel ? cplx_t'{re: tx_dmrs_re, im: tx_dmrs_im} : dft_sym;
  assign tx_dmrs_ready = tx_dmrs_sel && re_in_ready;

  ul_re_mapper u_ulmap (
    .clk, .rst_n, .m_sc(tx_m_sc), .sc_start(tx_sc_start), .in_valid(re_in_valid), .in_sym(re_in_sym),
    .in_ready(re_in_ready), .out_valid(re_valid), .out_bins(re_bins), .out_ready(re_out_ready));

  // the IFFT has no back-pressure: a frame enters only when the
  // interpolator is free and no other frame is in the IFFT pipeline
  assign re_out_ready = ip_in_ready && !if_busy;

  ifft16 u_ifft (
    .clk, .rst_n, .in_valid(re_valid && re_out_ready), .in_bins(re_bins),
    .out_valid(if_valid), .out_smp(if_smp), .busy(if_busy));

  interpolator u_interp (
    .clk, .rst_n, .mode_3k75(tx_mode_3k75), .first_of_slot(tx_first_of_slot),
    .in_valid(if_valid), .in_smp(if_smp), .in_ready(ip_in_ready),
    .out_valid(tx_out_valid), .out_smp(ip_smp), .out_last(tx_out_last));

  assign tx_busy   = te_busy || rm_busy || ci_busy;
  assign tx_out_re = ip_smp.re;
  assign tx_out_im = ip_smp.im;

  // =============================== receiver
  logic cfo_valid, ff_full, ff_empty;
  cplx_t cfo_smp, ff_smp;
  logic [4:0] ff_count;
  logic fft_valid;
  cplx_t fft_smp;
  logic [3:0] fft_idx;
  logic grid_ready;
  logic [3:0] ce_sc, ce_sym, nr_sc_rd, nr_sym_rd, nr_sc;
  cplx_t ce_data, nr_data, nr_re, eq_re;
  logic ce_done, nr_valid, nr_done, eq_valid;
  cplx_t h [12];
  logic dm_valid, dm_bit;
  logic ds_ready, ds_in_ready, ds_valid, ds_bit;
  logic bf_full, bf_empty, bf_bit;
  logic [7:0] bf_count;
  logic rd_in_ready, rd_valid, rd_last, rd_busy;
  logic [2:0] rd_d;
  logic vd_valid, vd_bit, vd_last, vd_tb, vd_busy;
  logic [2:0] vd_iter;
  logic crc_r_ready, crc_r_valid, crc_r_bit, crc_r_last;

  cfo_corrector u_cfo (
    .clk, .rst_n, .clear(rx_clear), .phase_inc(rx_phase_inc), .in_valid(rx_in_valid),
    .in_smp(cplx_t'{re: rx_in_re, im: rx_in_im}), .out_valid(cfo_valid), .out_smp(cfo_smp));

  sync_fifo #(.W(2 * DW), .DEPTH(16)) u_fifo (
    .clk, .rst_n, .wr_en(cfo_valid), .wr_data(cfo_smp), .full(ff_full),
    .rd_en(!ff_empty), .rd_data(ff_smp), .empty(ff_empty), .count(ff_count));

  fft16_sdf u_fft (
    .clk, .rst_n, .clear(rx_clear), .in_valid(!ff_empty), .in_smp(ff_smp),
    .out_valid(fft_valid), .out_smp(fft_smp), .out_idx(fft_idx));

  re_demapper u_demap (
    .clk, .rst_n, .clear(rx_clear), .in_valid(fft_valid), .in_re(fft_smp), .in_bin(fft_idx),
    .grid_ready(grid_ready), .rd_sc(nr_sc_rd), .rd_sym(nr_sym_rd), .rd_data(nr_data),
    .rd2_sc(ce_sc), .rd2_sym(ce_sym), .rd2_data(ce_data));

  channel_estimator u_est (
    .clk, .rst_n, .start(grid_ready), .ns0(rx_ns0), .cell_id(rx_cell_id),
    .rd_sc(ce_sc), .rd_sym(ce_sym), .rd_data(ce_data), .done(ce_done), .h_out(h));

  nrs_removal u_nrs (
    .clk, .rst_n, .start(ce_done), .cell_id(rx_cell_id), .rd_sc(nr_sc_rd), .rd_sym(nr_sym_rd),
    .rd_data(nr_data), .out_valid(nr_valid), .out_re(nr_re), .out_sc(nr_sc), .done(nr_done));

  equalizer u_eq (
    .clk, .rst_n, .in_valid(nr_valid), .in_re(nr_re), .h(h[nr_sc]), .out_valid(eq_valid), .out_re(eq_re));

  symbol_demapper u_sdm (
    .clk, .rst_n, .in_valid(eq_valid), .in_re(eq_re), .out_valid(dm_valid), .out_bit(dm_bit));

  scrambler u_dscr (
    .clk, .rst_n, .init(rx_start), .c_init(rx_c_init), .ready(ds_ready),
    .in_valid(dm_valid), .in_bit(dm_bit), .in_ready(ds_in_ready),
    .out_valid(ds_valid), .out_bit(ds_bit), .out_ready(!bf_full));

  sync_fifo #(.W(1), .DEPTH(128)) u_bitfifo (
    .clk, .rst_n, .wr_en(ds_valid), .wr_data(ds_bit), .full(bf_full),
    .rd_en(!bf_empty && rd_in_ready), .rd_data(bf_bit), .empty(bf_empty), .count(bf_count));

  rate_dematcher #(.KPI_MAX(KMAX)) u_rdm (
    .clk, .rst_n, .start(rx_start), .d_len(12'(rx_k_len)), .e_len(rx_e_len),
    .in_valid(!bf_empty), .in_bit(bf_bit), .in_ready(rd_in_ready),
    .out_valid(rd_valid), .out_d(rd_d), .out_last(rd_last), .busy(rd_busy));

  viterbi_decoder #(.KMAX(KMAX)) u_vit (
    .clk, .rst_n, .start(rx_start), .k_len(12'(rx_k_len)), .in_valid(rd_valid), .in_d(rd_d),
    .out_valid(vd_valid), .out_bit(vd_bit), .out_last(vd_last), .tail_biting(vd_tb),
    .iterations(vd_iter), .busy(vd_busy));

  crc24 #(.CHECK(1'b1)) u_crc_rx (
    .clk, .rst_n, .start(rx_start), .in_valid(vd_valid), .in_bit(vd_bit), .in_last(vd_last),
    .in_ready(crc_r_ready), .out_valid(crc_r_valid), .out_bit(crc_r_bit), .out_last(crc_r_last),
    .done(rx_done), .crc_ok(rx_crc_ok));

  assign rx_out_valid = vd_valid;
  assign rx_out_bit   = vd_bit;
  assign rx_busy      = rd_busy || vd_busy;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rx_tail_biting <= 1'b0;
    else if (vd_valid && vd_last) rx_tail_biting <= vd_tb;

  // =============================== NPSS detection
  coarse_sync u_cs (
    .clk, .rst_n, .in_valid(cs_in_valid), .in_smp(cplx_t'{re: cs_in_re, im: cs_in_im}),
    .threshold(cs_threshold), .peak_valid(cs_peak_valid), .peak_found(cs_peak_found),
    .npss_start(cs_npss_start), .peak_metric(cs_peak_metric), .peak_re(cs_peak_re), .peak_im(cs_peak_im));

  // =============================== links without back-pressure
  a_ci_accepts:    assert property (@(posedge clk) disable iff (!rst_n) rm_valid |-> ci_in_ready);
  a_turbo_accepts: assert property (@(posedge clk) disable iff (!rst_n) crc_t_valid |-> te_in_ready);
  a_fifo_no_full:  assert property (@(posedge clk) disable iff (!rst_n) cfo_valid |-> !ff_full);
  a_dscr_accepts:  assert property (@(posedge clk) disable iff (!rst_n) dm_valid |-> ds_in_ready);
  a_crc_accepts:   assert property (@(posedge clk) disable iff (!rst_n) vd_valid |-> crc_r_ready);
endmodule
