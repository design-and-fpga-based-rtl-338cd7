// sdf_stage: one radix-2 decimation-in-frequency stage of a single-path
// delay-feedback (SDF) FFT for N = 16.
//
// A feedback delay line of D samples advances on every valid input. In the
// first D inputs of each block of 2D the input is stored and the delay line
// releases the differences of the previous block, multiplied by the twiddle
// W16^(j*8/D) (j = position in the half block). In the second D inputs the
// stage outputs the sum of the stored and the incoming sample and stores
// their difference. Sums and differences are halved (1/16 over 4 stages).
// For D = 2 the only twiddles are 1 and -j, done by swapping and negating;
// for D = 1 there is none. Output is registered; out_valid starts once the
// first D inputs have been absorbed.
module sdf_stage import nbiot_pkg::*; #(
  parameter int D = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  in_valid,
  input  cplx_t in_smp,
  output logic  out_valid,
  output cplx_t out_smp
);
  localparam int CW = (D > 1) ? $clog2(2 * D) : 1;
  cplx_t dl [D];
  cplx_t head, sum, dif, rot;
  logic [CW-1:0] cnt;
  logic primed, second;

  assign head   = dl[D-1];
  assign second = (D == 1) ? cnt[0] : (cnt >= CW'(D));

  always_comb begin
    logic signed [DW:0] sr, si, dr, di;
    logic [3:0] tw;
    logic signed [DW-1:0] c, s;
    logic signed [2*DW+1:0] pr, pi;
    sr = head.re + in_smp.re;  si = head.im + in_smp.im;
    dr = head.re - in_smp.re;  di = head.im - in_smp.im;
    sum.re = DW'(sr >>> 1);    sum.im = DW'(si >>> 1);
    dif.re = DW'(dr >>> 1);    dif.im = DW'(di >>> 1);
    // twiddle of the released difference, position j = cnt (first half)
    tw = 4'((int'(cnt) * (8 / D)) & 15);
    c = cos16(tw);  s = sin16(tw);
    pr = 0; pi = 0;
    if (D >= 4) begin
      // head * exp(-j theta) = hr*c + hi*s + j(hi*c - hr*s)
      pr = head.re * c + head.im * s;
      pi = head.im * c - head.re * s;
      rot.re = DW'(pr >>> FRAC);
      rot.im = DW'(pi >>> FRAC);
    end else if (D == 2) begin
      if (cnt[0]) begin rot.re = head.im; rot.im = -head.re; end   // * (-j)
      else rot = head;
    end else begin
      rot = head;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; primed <= 1'b0; out_valid <= 1'b0; out_smp <= '0;
      for (int i = 0; i < D; i++) dl[i] <= '0;
    end else if (clear) begin
      cnt <= '0; primed <= 1'b0; out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        cnt <= (cnt == CW'(2 * D - 1)) ? '0 : cnt + 1'b1;
        for (int i = D - 1; i > 0; i--) dl[i] <= dl[i-1];
        if (second) begin
          dl[0]     <= dif;
          out_smp   <= sum;
          out_valid <= 1'b1;
          primed    <= 1'b1;
        end else begin
          dl[0]     <= in_smp;
          out_smp   <= rot;
          out_valid <= primed;
        end
      end
    end
  end
endmodule
