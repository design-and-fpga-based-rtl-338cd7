// ifft16: 16-point inverse FFT, radix-2 decimation in frequency, four
// pipelined butterfly stages.
//
// A frame of 16 frequency bins enters in parallel with in_valid; the 16
// time samples leave in natural order 4 clocks later with out_valid. Stage
// s (s = 0..3) pairs elements i and i+8/2^s, forms a+b and
// (a-b)*exp(+j*2*pi*(i mod half)*2^s/16), and halves both results, so the
// whole transform is scaled by 1/16 and cannot overflow. A new frame may
// enter every clock. busy is high while any frame is in flight.
// The four-stage radix-2 organisation follows the chain description; this
// version instantiates all 8 butterflies of each stage.
module ifft16 import nbiot_pkg::*; (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_bins [16],
  output logic  out_valid,
  output cplx_t out_smp [16],
  output logic  busy
);
  cplx_t st_d [5][16];
  logic vld [5];

  assign st_d[0] = in_bins;

  for (genvar s = 0; s < 4; s++) begin : g_stage
    localparam int HALF = 8 >> s;
    cplx_t nxt [16];
    always_comb begin
      for (int b = 0; b < 16; b++) begin
        if ((b % (2 * HALF)) < HALF) begin
          logic signed [DW:0] sr, si, dr, di;
          logic signed [2*DW+1:0] pr, pi;
          logic signed [DW-1:0] c, sn;
          int j;
          j  = b % HALF;
          sr = st_d[s][b].re + st_d[s][b+HALF].re;
          si = st_d[s][b].im + st_d[s][b+HALF].im;
          dr = st_d[s][b].re - st_d[s][b+HALF].re;
          di = st_d[s][b].im - st_d[s][b+HALF].im;
          c  = cos16(4'((j << s) & 15));
          sn = sin16(4'((j << s) & 15));
          // (d) * exp(+j theta) = dr*c - di*sn + j(dr*sn + di*c)
          pr = dr * c - di * sn;
          pi = dr * sn + di * c;
          nxt[b].re      = DW'(sr >>> 1);
          nxt[b].im      = DW'(si >>> 1);
          nxt[b+HALF].re = DW'(pr >>> (FRAC + 1));
          nxt[b+HALF].im = DW'(pi >>> (FRAC + 1));
        end
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vld[s+1] <= 1'b0;
        for (int b = 0; b < 16; b++) st_d[s+1][b] <= '0;
      end else begin
        vld[s+1] <= (s == 0) ? in_valid : vld[s];
        if ((s == 0) ? in_valid : vld[s]) st_d[s+1] <= nxt;
      end
    end
  end

  // the DIF result is in bit-reversed order
  always_comb
    for (int b = 0; b < 16; b++)
      out_smp[b] = st_d[4][{b[0], b[1], b[2], b[3]}];

  assign out_valid = vld[4];
  assign busy      = vld[1] || vld[2] || vld[3] || vld[4];
endmodule
