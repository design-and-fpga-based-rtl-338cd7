// dft_precoder: SC-FDMA transform precoder, an M-point DFT with
// M = 1, 3, 6 or 12 allocated subcarriers, scaled by 1/sqrt(M).
//
// COLLECT takes M modulated symbols (valid/ready). COMPUTE evaluates
// y(k) = sum_n x(n) * exp(-j*2*pi*n*k/M) with one complex multiply-
// accumulate per clock, taking the twiddles from a 12-entry table indexed by
// (n*k*12/M) mod 12, so every size shares the same multiplier and table.
// OUTPUT presents y(0..M-1) with valid/ready. A symbol of M subcarriers
// therefore takes M + M*M + M clocks (168 for M = 12), far inside one
// SC-FDMA symbol period at any practical clock.
// The supported sizes and the sharing of one arithmetic unit between them
// follow the chain description; the serial DFT in place of its pipelined
// 3-point / radix-2 structure is this design's simplification.
module dft_precoder import nbiot_pkg::*; (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] m_sc,      // 1, 3, 6 or 12
  input  logic       in_valid,
  input  cplx_t      in_sym,
  output logic       in_ready,
  output logic       out_valid,
  output cplx_t      out_sym,
  output logic       out_last,  // last of the M outputs of a symbol
  input  logic       out_ready
);
  typedef enum logic [1:0] {COLLECT, COMPUTE, OUTPUT} state_t;
  state_t st;

  cplx_t xbuf [12];
  cplx_t ybuf [12];
  logic [3:0] n, k, m_r, step;
  logic signed [39:0] acc_re, acc_im, nre, nim;
  logic [7:0] prod;
  logic [3:0] tidx;
  logic signed [DW-1:0] c, s;
  logic signed [15:0] isq;
  logic signed [39:0] sre, sim;

  always_comb begin
    case (m_r)
      4'd3:  begin step = 4'd4; isq = 16'sd9459; end
      4'd6:  begin step = 4'd2; isq = 16'sd6689; end
      4'd12: begin step = 4'd1; isq = 16'sd4730; end
      default: begin step = 4'd12; isq = 16'sd16384; end
    endcase
    prod = n * k * step;
    tidx = 4'(prod % 8'd12);
    c = cos12(tidx);
    s = sin12(tidx);
    // x * exp(-j theta) = (xr*c + xi*s) + j(xi*c - xr*s)
    nre = acc_re + 40'(xbuf[n].re * c) + 40'(xbuf[n].im * s);
    nim = acc_im + 40'(xbuf[n].im * c) - 40'(xbuf[n].re * s);
    sre = (nre >>> FRAC) * isq;
    sim = (nim >>> FRAC) * isq;
  end

  assign in_ready  = (st == COLLECT);
  assign out_valid = (st == OUTPUT);
  assign out_sym   = ybuf[k];
  assign out_last  = (st == OUTPUT) && (k == m_r - 4'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= COLLECT; n <= '0; k <= '0; m_r <= 4'd12; acc_re <= '0; acc_im <= '0;
      for (int i = 0; i < 12; i++) begin xbuf[i] <= '0; ybuf[i] <= '0; end
    end else begin
      case (st)
        COLLECT: if (in_valid) begin
          if (n == '0) m_r <= m_sc;
          xbuf[n] <= in_sym;
          if (n == ((n == '0) ? m_sc : m_r) - 4'd1) begin
            st <= COMPUTE; n <= '0; k <= '0; acc_re <= '0; acc_im <= '0;
          end else n <= n + 4'd1;
        end
        COMPUTE: begin
          if (n == m_r - 4'd1) begin
            ybuf[k].re <= DW'(sre >>> FRAC);
            ybuf[k].im <= DW'(sim >>> FRAC);
            acc_re <= '0; acc_im <= '0; n <= '0;
            if (k == m_r - 4'd1) begin st <= OUTPUT; k <= '0; end
            else k <= k + 4'd1;
          end else begin
            acc_re <= nre; acc_im <= nim; n <= n + 4'd1;
          end
        end
        OUTPUT: if (out_ready) begin
          if (k == m_r - 4'd1) begin st <= COLLECT; k <= '0; end
          else k <= k + 4'd1;
        end
        default: st <= COLLECT;
      endcase
    end
  end
endmodule
