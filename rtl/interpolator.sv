// interpolator: upsampling, cyclic prefix insertion and parallel-to-serial
// conversion of the IFFT output.
//
// A frame of 16 time samples is taken in parallel (valid/ready) and sent
// out one sample per clock as N_cp + 16*U samples. U = 8 for 15 kHz
// subcarrier spacing (128 samples, CP 10 on the first symbol of a slot,
// 9 otherwise) and U = 32 for 3.75 kHz (512 samples, CP 40 / 36). Output
// sample n of the upsampled symbol lies between input samples n/U and
// n/U + 1 (circularly) and is formed by linear interpolation,
// x(i) + (x(i+1) - x(i)) * (n mod U) / U, so the cyclic prefix is simply the
// read-out started N_cp samples before the end of the symbol.
// Upsampling factors and CP lengths follow the chain description; the
// linear interpolation filter is this design's choice.
module interpolator import nbiot_pkg::*; (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  mode_3k75,     // 0: 15 kHz, 1: 3.75 kHz
  input  logic  first_of_slot, // sampled with the frame: long CP
  input  logic  in_valid,
  input  cplx_t in_smp [16],
  output logic  in_ready,
  output logic  out_valid,
  output cplx_t out_smp,
  output logic  out_last
);
  cplx_t buf_s [16];
  logic busy, m32;
  logic [8:0] n;       // position in the upsampled symbol, mod 16*U
  logic [9:0] left;    // samples still to send
  logic [3:0] i0, i1;
  logic [4:0] f;
  logic signed [DW:0] dre, dim;
  logic signed [DW+5:0] pre, pim;

  assign in_ready = !busy;
  always_comb begin
    if (m32) begin i0 = n[8:5]; f = n[4:0]; end
    else     begin i0 = 4'(n[6:3]); f = {2'b0, n[2:0]}; end
    i1  = i0 + 4'd1;
    dre = buf_s[i1].re - buf_s[i0].re;
    dim = buf_s[i1].im - buf_s[i0].im;
    pre = dre * $signed({1'b0, f});
    pim = dim * $signed({1'b0, f});
    out_smp.re = buf_s[i0].re + DW'(m32 ? (pre >>> 5) : (pre >>> 3));
    out_smp.im = buf_s[i0].im + DW'(m32 ? (pim >>> 5) : (pim >>> 3));
  end
  assign out_valid = busy;
  assign out_last  = busy && (left == 10'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; m32 <= 1'b0; n <= '0; left <= '0;
      for (int b = 0; b < 16; b++) buf_s[b] <= '0;
    end else if (!busy) begin
      if (in_valid) begin
        buf_s <= in_smp;
        busy  <= 1'b1;
        m32   <= mode_3k75;
        if (mode_3k75) begin
          n    <= first_of_slot ? 9'd472 : 9'd476;      // 512 - 40 / 512 - 36
          left <= first_of_slot ? 10'd552 : 10'd548;
        end else begin
          n    <= first_of_slot ? 9'd118 : 9'd119;      // 128 - 10 / 128 - 9
          left <= first_of_slot ? 10'd138 : 10'd137;
        end
      end
    end else begin
      n    <= m32 ? n + 9'd1 : {2'b0, 7'(n + 9'd1)};
      left <= left - 10'd1;
      if (left == 10'd1) busy <= 1'b0;
    end
  end
endmodule
