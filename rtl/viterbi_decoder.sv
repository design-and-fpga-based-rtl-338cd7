// viterbi_decoder: hard-decision decoder for the rate-1/3 tail-biting
// convolutional code (constraint length 7, generators 133, 171, 165 octal),
// using the modified circular Viterbi algorithm.
//
// LOAD stores the K received triplets. Each iteration then runs K
// add-compare-select steps, one trellis step per clock for all 64 states:
// the branch metric is the Hamming distance between the received and the
// expected triplet, path metrics are renormalised by the previous minimum,
// and 64 decision bits per step go to the survivor memory. The first
// iteration starts from all-zero metrics, later ones from the final metrics
// of the previous iteration. Trace-back starts from the best final state and
// writes the decoded bits into a LIFO (K clocks). If the trace-back ends in
// the state it started from the path is tail-biting and decoding stops;
// otherwise another iteration runs, up to MAX_ITER, after which the best
// path is used. The LIFO is then read out in order, one bit per clock.
// State s = (c_{k-1} .. c_{k-6}); s[0] is the most recent bit.
// The algorithm steps and the LIFO follow the chain description;
// MAX_ITER is this design's choice.
module viterbi_decoder import nbiot_pkg::*; #(
  parameter int KMAX = 2560,
  parameter int MAX_ITER = 4,
  localparam int KW = $clog2(KMAX + 1),
  localparam int MW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [KW-1:0] k_len,
  input  logic          in_valid,
  input  logic [2:0]    in_d,       // {d2, d1, d0}
  output logic          out_valid,
  output logic          out_bit,
  output logic          out_last,
  output logic          tail_biting, // valid with out_last: path was tail-biting
  output logic [2:0]    iterations,  // iterations used
  output logic          busy
);
  typedef enum logic [2:0] {IDLE, LOAD, ACS, BEST, TRACE, OUT} state_t;
  state_t st;

  logic [2:0]  inbuf [KMAX];
  logic [63:0] surv  [KMAX];
  logic        lifo  [KMAX];
  logic [MW-1:0] pm [64];
  logic [MW-1:0] pm_n [64];
  logic [63:0] dec;
  logic [KW-1:0] k_r, t;
  logic [5:0] cur, best, best_c;
  logic [2:0] iter;
  logic [MW-1:0] pmin;

  function automatic logic [2:0] enc_out(input logic [5:0] s, input logic u);
    return {u ^ s[0] ^ s[1] ^ s[3] ^ s[5],
            u ^ s[0] ^ s[1] ^ s[2] ^ s[5],
            u ^ s[1] ^ s[2] ^ s[4] ^ s[5]};
  endfunction

  // add-compare-select for all states
  always_comb begin
    logic [2:0] rx;
    rx = inbuf[t];
    pmin = pm[0];
    for (int i = 1; i < 64; i++) if (pm[i] < pmin) pmin = pm[i];
    for (int ns = 0; ns < 64; ns++) begin
      logic [5:0] s0, s1, nsv;
      logic [2:0] e0, e1;
      logic [MW-1:0] c0, c1;
      nsv = 6'(ns);
      s0 = {1'b0, nsv[5:1]};
      s1 = {1'b1, nsv[5:1]};
      e0 = enc_out(s0, nsv[0]) ^ rx;
      e1 = enc_out(s1, nsv[0]) ^ rx;
      c0 = pm[s0] + MW'(e0[0]) + MW'(e0[1]) + MW'(e0[2]) - pmin;
      c1 = pm[s1] + MW'(e1[0]) + MW'(e1[1]) + MW'(e1[2]) - pmin;
      dec[ns]  = (c1 < c0);
      pm_n[ns] = (c1 < c0) ? c1 : c0;
    end
    best_c = '0;
    for (int i = 1; i < 64; i++) if (pm[i] < pm[best_c]) best_c = 6'(i);
  end

  assign busy = (st != IDLE);

  always_ff @(posedge clk) begin
    if (st == LOAD && in_valid) inbuf[t] <= in_d;
    if (st == ACS) surv[t] <= dec;
    if (st == TRACE) lifo[t] <= cur[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; k_r <= '0; t <= '0; cur <= '0; best <= '0; iter <= '0;
      out_valid <= 1'b0; out_bit <= 1'b0; out_last <= 1'b0; tail_biting <= 1'b0; iterations <= '0;
      for (int i = 0; i < 64; i++) pm[i] <= '0;
    end else begin
      out_valid <= 1'b0; out_last <= 1'b0;
      if (start) begin
        st <= LOAD; k_r <= k_len; t <= '0; iter <= '0;
        for (int i = 0; i < 64; i++) pm[i] <= '0;
      end else begin
        case (st)
          LOAD: if (in_valid) begin
            if (t == k_r - 1'b1) begin st <= ACS; t <= '0; end
            else t <= t + 1'b1;
          end
          ACS: begin
            pm <= pm_n;
            if (t == k_r - 1'b1) st <= BEST;
            else t <= t + 1'b1;
          end
          BEST: begin
            best <= best_c; cur <= best_c; st <= TRACE;   // t = K-1
          end
          TRACE: begin
            cur <= {surv[t][cur], cur[5:1]};
            if (t == '0) begin
              iter <= iter + 3'd1;
              // cur is updated this clock; compare the state at time 0
              if ({surv[t][cur], cur[5:1]} == best || iter == 3'(MAX_ITER - 1)) begin
                st <= OUT;
                tail_biting <= ({surv[t][cur], cur[5:1]} == best);
                iterations <= iter + 3'd1;
              end else st <= ACS;
            end else t <= t - 1'b1;
          end
          OUT: begin
            out_valid <= 1'b1;
            out_bit   <= lifo[t];
            if (t == k_r - 1'b1) begin out_last <= 1'b1; st <= IDLE; end
            else t <= t + 1'b1;
          end
          default: st <= IDLE;
        endcase
      end
    end
  end
endmodule
