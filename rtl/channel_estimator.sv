// channel_estimator: least-squares pilot channel estimation with linear
// interpolation over the 12 subcarriers of a subframe.
//
// For each of the four NRS symbols of the subframe (l = 5, 6 of both slots)
// the NRS generator produces the two transmitted pilots, and the received
// pilots are read from the resource grid. The LS estimate is
// H = y / x = y * conj(x) since |x| = 1, done with sign flips and one
// constant multiply by 1/sqrt(2). The eight pilots sit on four subcarriers
// a, a+3, a+6, a+9 (a = N_ID mod 3); the two estimates on each are averaged,
// giving four channel responses. Linear interpolation (and extrapolation at
// the band edges) H(k) = H_i + (H_{i+1} - H_i) * t / 3 then gives one value
// per subcarrier, one subcarrier per clock. done pulses when h_out holds the
// 12 values; they stay valid until the next start. A run takes about
// 4 x 1610 clocks, dominated by the Gold sequence fast-forward.
// LS estimation, four responses from eight pilots and linear interpolation
// follow the chain description; averaging the two slots is this design's.
module channel_estimator import nbiot_pkg::*; (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [4:0] ns0,       // first (even) slot of the subframe
  input  logic [8:0] cell_id,
  output logic [3:0] rd_sc,
  output logic [3:0] rd_sym,
  input  cplx_t      rd_data,
  output logic       done,
  output cplx_t      h_out [12]
);
  typedef enum logic [2:0] {IDLE, GEN, WAITG, PIL0, PIL1, INTERP} state_t;
  state_t st;

  logic       g_start, g_done;
  cplx_t      pilot [2];
  logic [3:0] k_pos [2];
  logic [1:0] q;
  logic [3:0] sc;
  logic signed [DW+1:0] hs_re [4];
  logic signed [DW+1:0] hs_im [4];
  logic [1:0] pa;                     // a = N_ID mod 3

  nrs_gen u_nrs (
    .clk, .rst_n, .start(g_start), .ns(ns0 + {4'b0, q[1]}), .l(q[0] ? 3'd6 : 3'd5),
    .cell_id, .done(g_done), .pilot, .k_pos
  );

  // LS estimate of the pilot currently addressed
  cplx_t x_cur;
  logic [3:0] k_cur;
  logic signed [DW+1:0] lr, li;
  logic signed [DW+17:0] er, ei;
  always_comb begin
    x_cur = (st == PIL1) ? pilot[1] : pilot[0];
    k_cur = (st == PIL1) ? k_pos[1] : k_pos[0];
    rd_sc  = (st == INTERP) ? '0 : k_cur;
    rd_sym = (q[1] ? 4'd7 : 4'd0) + (q[0] ? 4'd6 : 4'd5);   // 7*slot + l
    lr = (x_cur.re[DW-1] ? -(DW+2)'(rd_data.re) : (DW+2)'(rd_data.re))
       + (x_cur.im[DW-1] ? -(DW+2)'(rd_data.im) : (DW+2)'(rd_data.im));
    li = (x_cur.re[DW-1] ? -(DW+2)'(rd_data.im) : (DW+2)'(rd_data.im))
       - (x_cur.im[DW-1] ? -(DW+2)'(rd_data.re) : (DW+2)'(rd_data.re));
    er = lr * 16'sd11585;
    ei = li * 16'sd11585;
  end

  // interpolation for subcarrier sc
  logic signed [4:0] t, fr;
  logic [1:0] seg;
  logic signed [DW+1:0] h0r, h0i, h1r, h1i;
  logic signed [DW+2:0] dr, di;
  logic signed [DW+24:0] ir, ii;
  always_comb begin
    t = $signed({1'b0, sc}) - $signed({3'b0, pa});
    if (t < 0) seg = 2'd0;
    else if (t >= 5'sd6) seg = 2'd2;
    else if (t >= 5'sd3) seg = 2'd1;
    else seg = 2'd0;
    fr = t - 5'sd3 * $signed({3'b0, seg});
    h0r = hs_re[seg] >>> 1;     h0i = hs_im[seg] >>> 1;
    h1r = hs_re[seg + 2'd1] >>> 1; h1i = hs_im[seg + 2'd1] >>> 1;
    dr = h1r - h0r; di = h1i - h0i;
    // * fr / 3, with 1/3 = 10923 / 2^15
    ir = (dr * fr) * 16'sd10923;
    ii = (di * fr) * 16'sd10923;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; q <= '0; sc <= '0; done <= 1'b0; g_start <= 1'b0; pa <= '0;
      for (int i = 0; i < 4; i++) begin hs_re[i] <= '0; hs_im[i] <= '0; end
      for (int i = 0; i < 12; i++) h_out[i] <= '0;
    end else begin
      done <= 1'b0; g_start <= 1'b0;
      case (st)
        IDLE: if (start) begin
          st <= GEN; q <= '0; pa <= 2'(cell_id % 9'd3);
          for (int i = 0; i < 4; i++) begin hs_re[i] <= '0; hs_im[i] <= '0; end
        end
        GEN:   begin g_start <= 1'b1; st <= WAITG; end
        WAITG: if (g_done) st <= PIL0;
        PIL0, PIL1: begin
          hs_re[2'(k_cur / 4'd3)] <= hs_re[2'(k_cur / 4'd3)] + (DW+2)'(er >>> FRAC);
          hs_im[2'(k_cur / 4'd3)] <= hs_im[2'(k_cur / 4'd3)] + (DW+2)'(ei >>> FRAC);
          if (st == PIL0) st <= PIL1;
          else if (q == 2'd3) begin st <= INTERP; sc <= '0; end
          else begin q <= q + 2'd1; st <= GEN; end
        end
        INTERP: begin
          h_out[sc].re <= DW'(h0r + (DW+2)'(ir >>> 15));
          h_out[sc].im <= DW'(h0i + (DW+2)'(ii >>> 15));
          if (sc == 4'd11) begin st <= IDLE; done <= 1'b1; end
          else sc <= sc + 4'd1;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
