// turbo_encoder: rate-1/3 parallel concatenated convolutional (turbo) encoder.
//
// Two identical 8-state recursive systematic encoders, g0 = 1+D^2+D^3
// (feedback) and g1 = 1+D+D^3 (parity), start from the all-zero state. The
// second encoder sees the block through the QPP interleaver
// pi(i) = (f1*i + f2*i^2) mod K.
// Operation: after start, K input bits are written into a bit buffer
// (LOAD). During ENC one triplet (d0,d1,d2) = (x_k, z_k, z'_k) leaves per
// clock, reading c_k and c_pi(k) from the buffer. pi is produced
// incrementally: pi(i+1) = pi(i)+g(i), g(i+1) = g(i)+2*f2, both mod K, so a
// compare-and-subtract replaces a divider. During TERM the 12 trellis
// termination bits go out as 4 triplets in the order of 36.212 5.1.3.2.2.
// Output: K+4 triplets, one per cycle, out_last on the final one.
// f1 and f2 are inputs: the K-indexed f1/f2 table is supplied by the caller.
module turbo_encoder import nbiot_pkg::*; #(
  parameter int KMAX = 2560,
  localparam int KW = $clog2(KMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [KW-1:0] k_len,
  input  logic [KW-1:0] f1,
  input  logic [KW-1:0] f2,
  input  logic          in_valid,
  input  logic          in_bit,
  output logic          in_ready,
  output logic          out_valid,
  output logic [2:0]    out_d,     // {d2, d1, d0}
  output logic          out_last,
  output logic          busy
);
  typedef enum logic [1:0] {IDLE, LOAD, ENC, TERM} state_t;
  state_t st;

  logic [KMAX-1:0] buffer;
  logic [KW-1:0] k_r, idx, pi_i, g_i, f2x2, cnt;
  logic [KW:0]   sum_pi, sum_g;
  logic [2:0]    s1, s2;       // {D^3, D^2, D^1} state of each RSC
  logic [1:0]    tcnt;
  logic          x, xp, a1, a2;

  // termination sequence of both encoders, worked out from the state at entry
  logic [2:0] t1x, t1z, t2x, t2z;

  function automatic void rsc_term(input logic [2:0] s, output logic [2:0] xo, output logic [2:0] zo);
    logic [2:0] st_l;
    st_l = s;
    for (int j = 0; j < 3; j++) begin
      xo[j] = st_l[1] ^ st_l[2];              // input that zeroes the feedback
      zo[j] = st_l[0] ^ st_l[2];              // parity with register input 0
      st_l  = {st_l[1], st_l[0], 1'b0};
    end
  endfunction

  always_comb begin
    rsc_term(s1, t1x, t1z);
    rsc_term(s2, t2x, t2z);
  end

  assign x   = buffer[idx];
  assign xp  = buffer[pi_i];
  assign a1  = x  ^ s1[1] ^ s1[2];
  assign a2  = xp ^ s2[1] ^ s2[2];
  assign in_ready = (st == LOAD);
  assign busy = (st != IDLE);
  assign sum_pi = {1'b0, pi_i} + {1'b0, g_i};
  assign sum_g  = {1'b0, g_i} + {1'b0, f2x2};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; k_r <= '0; idx <= '0; pi_i <= '0; g_i <= '0; f2x2 <= '0; cnt <= '0;
      s1 <= '0; s2 <= '0; tcnt <= '0; out_valid <= 1'b0; out_d <= '0; out_last <= 1'b0;
      buffer <= '0;
    end else begin
      out_valid <= 1'b0; out_last <= 1'b0;
      if (start) begin
        st <= LOAD; k_r <= k_len; cnt <= '0; idx <= '0; s1 <= '0; s2 <= '0; tcnt <= '0;
        pi_i <= '0;
        // g(0) = (f1 + f2) mod K; 2*f2 mod K
        g_i  <= ({1'b0, f1} + {1'b0, f2} >= {1'b0, k_len}) ? KW'({1'b0, f1} + {1'b0, f2} - {1'b0, k_len}) : f1 + f2;
        f2x2 <= ({f2, 1'b0} >= {1'b0, k_len}) ? KW'({f2, 1'b0} - {1'b0, k_len}) : KW'({f2, 1'b0});
      end else begin
        case (st)
          LOAD: if (in_valid) begin
            buffer[cnt] <= in_bit;
            cnt <= cnt + 1'b1;
            if (cnt == k_r - 1'b1) begin st <= ENC; cnt <= '0; end
          end
          ENC: begin
            out_valid <= 1'b1;
            out_d     <= {a2 ^ s2[0] ^ s2[2], a1 ^ s1[0] ^ s1[2], x};
            s1 <= {s1[1], s1[0], a1};
            s2 <= {s2[1], s2[0], a2};
            idx  <= idx + 1'b1;
            pi_i <= (sum_pi >= {1'b0, k_r}) ? KW'(sum_pi - {1'b0, k_r}) : KW'(sum_pi);
            g_i  <= (sum_g  >= {1'b0, k_r}) ? KW'(sum_g  - {1'b0, k_r}) : KW'(sum_g);
            if (idx == k_r - 1'b1) st <= TERM;
          end
          TERM: begin
            out_valid <= 1'b1;
            tcnt <= tcnt + 1'b1;
            case (tcnt)
              2'd0: out_d <= {t1x[1], t1z[0], t1x[0]};
              2'd1: out_d <= {t1z[2], t1x[2], t1z[1]};
              2'd2: out_d <= {t2x[1], t2z[0], t2x[0]};
              default: begin
                out_d <= {t2z[2], t2x[2], t2z[1]};
                out_last <= 1'b1;
                st <= IDLE;
              end
            endcase
          end
          default: ;
        endcase
      end
    end
  end
endmodule
