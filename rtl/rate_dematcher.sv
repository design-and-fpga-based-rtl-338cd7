// rate_dematcher: inverse of the convolutional-code rate matching, with
// combining of repetitions.
//
// Bit collection: after start the three accumulator memories (one per
// encoder stream, KPI_MAX words of CW bits) are cleared, one word per clock.
// Then received hard bits are taken one per clock. A position counter walks
// the circular buffer w = [v0 v1 v2] of the transmitter (column by column
// through the permuted columns P, row by row inside a column); dummy
// positions (P(col) < N_D in row 0) are stepped over with in_ready low.
// Each bit adds +1 (bit 0) or -1 (bit 1), saturating, to the word at its
// de-interleaved address P(col) + 32*row of its stream, so repetitions are
// combined and the sub-block interleaving is undone by the addressing.
// Output: after E bits, D triplets (d0,d1,d2) are read from addresses
// N_D .. N_D+D-1 and decided by sign (a negative sum -> 1), one per clock.
// Memory sizes (3 x 2560 x 12 = 7680 x 12) follow the chain description;
// de-interleaving by address instead of separate de-interleaver memories is
// this design's choice.
module rate_dematcher import nbiot_pkg::*; #(
  parameter int KPI_MAX = 2560,
  parameter int CW = 12,
  parameter int EMAX = 65535,
  localparam int AW = $clog2(KPI_MAX),
  localparam int RW = $clog2(KPI_MAX / 32 + 1),
  localparam int DWID = $clog2(KPI_MAX + 1),
  localparam int EW = $clog2(EMAX + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [DWID-1:0] d_len,     // D (bits per stream)
  input  logic [EW-1:0]   e_len,     // received bits E
  input  logic            in_valid,
  input  logic            in_bit,
  output logic            in_ready,
  output logic            out_valid,
  output logic [2:0]      out_d,     // {d2, d1, d0}
  output logic            out_last,
  output logic            busy
);
  typedef enum logic [1:0] {IDLE, CLEAR, COLLECT, OUTPUT} state_t;
  state_t st;

  logic signed [CW-1:0] rd_cur [3];
  logic [2:0] rd_sign;
  logic [RW-1:0] rows, r;
  logic [4:0] nd, ci, pc;
  logic [1:0] s;
  logic [AW-1:0] cnt, waddr;
  logic [DWID-1:0] d_r;
  logic [EW-1:0] e_r, ecnt;
  logic is_null, take;
  logic signed [CW-1:0] cur, upd;
  logic [RW-1:0] rows_c;

  assign rows_c  = RW'((d_len + 31) >> 5);
  assign pc      = perm_conv(ci);
  assign is_null = (r == '0) && (pc < nd);
  assign waddr   = AW'({r, 5'b0}) + AW'(pc);
  assign in_ready = (st == COLLECT) && !is_null;
  assign take    = in_valid && in_ready;
  assign cur     = rd_cur[s];
  always_comb begin
    if (in_bit) upd = (cur == {1'b1, {(CW-1){1'b0}}}) ? cur : cur - 1'b1;
    else        upd = (cur == {1'b0, {(CW-1){1'b1}}}) ? cur : cur + 1'b1;
  end
  assign busy = (st != IDLE);

  logic [AW-1:0] raddr;
  assign raddr = AW'(nd) + cnt;

  // one accumulator memory per encoder stream
  for (genvar j = 0; j < 3; j++) begin : g_acc
    logic signed [CW-1:0] acc [KPI_MAX];
    always_ff @(posedge clk) begin
      if (st == CLEAR) acc[cnt] <= '0;
      else if (take && s == 2'(j)) acc[waddr] <= upd;
    end
    assign rd_cur[j]  = acc[waddr];
    assign rd_sign[j] = acc[raddr][CW-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; rows <= '0; r <= '0; nd <= '0; ci <= '0; s <= '0; cnt <= '0;
      d_r <= '0; e_r <= '0; ecnt <= '0; out_valid <= 1'b0; out_d <= '0; out_last <= 1'b0;
    end else begin
      out_valid <= 1'b0; out_last <= 1'b0;
      if (start) begin
        st <= CLEAR; cnt <= '0; rows <= rows_c; nd <= 5'((rows_c << 5) - d_len);
        d_r <= d_len; e_r <= e_len; r <= '0; ci <= '0; s <= '0; ecnt <= '0;
      end else begin
        case (st)
          CLEAR: begin
            cnt <= cnt + 1'b1;
            if (cnt == AW'(({rows, 5'b0}) - 1)) begin st <= COLLECT; cnt <= '0; end
          end
          COLLECT: begin
            if (take || is_null) begin
              if (r == rows - 1'b1) begin
                r <= '0;
                if (ci == 5'd31) begin ci <= '0; s <= (s == 2'd2) ? 2'd0 : s + 2'd1; end
                else ci <= ci + 5'd1;
              end else r <= r + 1'b1;
            end
            if (take) begin
              ecnt <= ecnt + 1'b1;
              if (ecnt == e_r - 1'b1) begin st <= OUTPUT; cnt <= '0; end
            end
          end
          OUTPUT: begin
            out_valid <= 1'b1;
            out_d <= rd_sign;
            cnt <= cnt + 1'b1;
            if (cnt == AW'(d_r - 1'b1)) begin out_last <= 1'b1; st <= IDLE; end
          end
          default: ;
        endcase
      end
    end
  end
endmodule
