// coarse_sync: NPSS detection by a reduced, frame-averaged auto-correlation
// metric (first step of coarse synchronisation).
//
// The NPSS is 11 repetitions of one OFDM symbol (NS samples each) under the
// code cover S = (1 1 1 1 -1 -1 1 1 1 -1 1). For every incoming sample r(n):
//  * a single-symbol buffer of NS samples delays the input, and the
//    product p = r(n-NS) * conj(r(n)) is formed (lag of one symbol);
//  * the products pass through a chain of NSYM buffers of NS entries each,
//    one per symbol of the correlation window N_w = NSYM*NS. Each buffer has
//    an accumulator that adds the product entering it and subtracts the one
//    leaving it, so it always holds the sum of its buffer;
//  * the metric R = sum_j sign_j * acc_j applies the sign pattern
//    S(l)*S(l+1) of the code cover (NEG_MASK, bit l set = negative);
//  * RED consecutive R values are summed (reduction by RED, NM = frame/RED
//    entries per frame), and |R_r| ~ |Re| + |Im| updates the stored metric
//    A(m) = A(m)*(1-alpha) + |R_r(m)|*alpha with alpha = 2^-ALPHA_SH (the
//    first frame stores |R_r| directly);
//  * the largest A(m) of each frame is compared with threshold at frame end.
// peak_valid pulses once per frame; peak_found says the threshold was
// passed, npss_start is the frame position of the first NPSS sample implied
// by the peak (resolution RED samples), and peak_re/peak_im are R_r at the
// peak, whose angle / (2*pi) is the fractional frequency offset times the
// lag. Buffers read as zero until first written, so no memory needs a reset.
// Everything above follows the chain description; the magnitude
// approximation, the word widths and the first-frame rule are this
// design's choices. The cross-correlation steps (integer offset and
// refinement) are not part of this block.
module coarse_sync import nbiot_pkg::*; #(
  parameter int NS = 137,
  parameter int NSYM = 10,
  parameter int RED = 16,
  parameter int NM = 1200,
  parameter logic [NSYM-1:0] NEG_MASK = 10'h328,
  parameter int ALPHA_SH = 2,
  parameter int PSH = 9,
  localparam int FRAME = NM * RED,
  localparam int PW = 2 * DW + 1 - PSH,
  localparam int AWD = PW + $clog2(NS) + 1,
  localparam int MWD = AWD + $clog2(NSYM) + $clog2(RED) + 3,
  localparam int FW = $clog2(FRAME),
  localparam int PTW = $clog2(NS),
  localparam int MAW = $clog2(NM)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  cplx_t           in_smp,
  input  logic [MWD-1:0]  threshold,
  output logic            peak_valid,
  output logic            peak_found,
  output logic [FW-1:0]   npss_start,
  output logic [MWD-1:0]  peak_metric,
  output logic signed [MWD-1:0] peak_re,
  output logic signed [MWD-1:0] peak_im
);
  typedef struct packed {
    logic signed [PW-1:0] re;
    logic signed [PW-1:0] im;
  } prod_t;

  cplx_t dl [NS];
  prod_t pb_rd [NSYM];
  logic signed [AWD-1:0] acc_re [NSYM];
  logic signed [AWD-1:0] acc_im [NSYM];
  logic [MWD-1:0] amem [NM];

  logic [PTW-1:0] ptr;
  logic [FW-1:0] pos;
  logic [$clog2((NSYM + 2) * NS + 1)-1:0] fill;
  logic [$clog2(RED)-1:0] rcnt;
  logic [MAW-1:0] m;
  logic first_frame;
  logic signed [MWD-1:0] rr_re, rr_im;
  logic [MWD-1:0] best;
  logic [FW-1:0] best_pos;
  logic signed [MWD-1:0] best_re, best_im;

  cplx_t old;
  prod_t prod;
  prod_t seg_in [NSYM];
  prod_t seg_out [NSYM];
  logic signed [MWD-1:0] r_re, r_im, n_re, n_im, mag, a_old, a_new;

  always_comb begin
    logic signed [2*DW:0] pr, pi;
    old = (fill >= ($bits(fill))'(NS)) ? dl[ptr] : '0;
    pr = old.re * in_smp.re + old.im * in_smp.im;
    pi = old.im * in_smp.re - old.re * in_smp.im;
    prod.re = PW'(pr >>> PSH);
    prod.im = PW'(pi >>> PSH);
    r_re = '0; r_im = '0;
    for (int j = 0; j < NSYM; j++)
      seg_out[j] = (fill >= ($bits(fill))'((j + 2) * NS)) ? pb_rd[j] : '0;
    for (int j = 0; j < NSYM; j++) begin
      seg_in[j]  = (j == 0) ? prod : seg_out[j-1];
      // segment j holds window symbol NSYM-1-j
      if (NEG_MASK[NSYM-1-j]) begin
        r_re = r_re - MWD'(acc_re[j]); r_im = r_im - MWD'(acc_im[j]);
      end else begin
        r_re = r_re + MWD'(acc_re[j]); r_im = r_im + MWD'(acc_im[j]);
      end
    end
    n_re = rr_re + r_re;
    n_im = rr_im + r_im;
    mag  = MWD'((n_re < 0) ? -n_re : n_re) + MWD'((n_im < 0) ? -n_im : n_im);
    a_old = amem[m];
    a_new = first_frame ? mag : a_old - (a_old >> ALPHA_SH) + (mag >> ALPHA_SH);
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      dl[ptr] <= in_smp;
      if (rcnt == ($bits(rcnt))'(RED - 1)) amem[m] <= a_new;
    end
  end

  // one product buffer per window symbol
  for (genvar j = 0; j < NSYM; j++) begin : g_pb
    prod_t pb [NS];
    always_ff @(posedge clk) if (in_valid) pb[ptr] <= seg_in[j];
    assign pb_rd[j] = pb[ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0; pos <= '0; fill <= '0; rcnt <= '0; m <= '0; first_frame <= 1'b1;
      rr_re <= '0; rr_im <= '0; best <= '0; best_pos <= '0; best_re <= '0; best_im <= '0;
      peak_valid <= 1'b0; peak_found <= 1'b0; npss_start <= '0; peak_metric <= '0;
      peak_re <= '0; peak_im <= '0;
      for (int j = 0; j < NSYM; j++) begin acc_re[j] <= '0; acc_im[j] <= '0; end
    end else begin
      peak_valid <= 1'b0;
      if (in_valid) begin
        ptr <= (ptr == PTW'(NS - 1)) ? '0 : ptr + 1'b1;
        pos <= (pos == FW'(FRAME - 1)) ? '0 : pos + 1'b1;
        if (fill != ($bits(fill))'((NSYM + 2) * NS)) fill <= fill + 1'b1;
        for (int j = 0; j < NSYM; j++) begin
          acc_re[j] <= acc_re[j] + AWD'(seg_in[j].re) - AWD'(seg_out[j].re);
          acc_im[j] <= acc_im[j] + AWD'(seg_in[j].im) - AWD'(seg_out[j].im);
        end
        if (rcnt == ($bits(rcnt))'(RED - 1)) begin
          rcnt <= '0; rr_re <= '0; rr_im <= '0;
          if (a_new > best || m == '0) begin
            best <= a_new; best_pos <= pos; best_re <= n_re; best_im <= n_im;
          end
          if (m == MAW'(NM - 1)) begin
            m <= '0; first_frame <= 1'b0;
            peak_valid <= 1'b1;
            if (a_new > best) begin
              peak_found  <= a_new > threshold; peak_metric <= a_new;
              npss_start  <= start_of(pos);     peak_re <= n_re; peak_im <= n_im;
            end else begin
              peak_found  <= best > threshold;  peak_metric <= best;
              npss_start  <= start_of(best_pos); peak_re <= best_re; peak_im <= best_im;
            end
          end else m <= m + 1'b1;
        end else begin
          rcnt <= rcnt + 1'b1; rr_re <= n_re; rr_im <= n_im;
        end
      end
    end
  end

  // first NPSS sample when the window ends with the sample at frame
  // position p: the window spans (NSYM+1)*NS samples
  function automatic logic [FW-1:0] start_of(input logic [FW-1:0] p);
    int s;
    s = int'(p) - (NSYM + 1) * NS + 1;
    if (s < 0) s += FRAME;
    return FW'(s);
  endfunction
endmodule
