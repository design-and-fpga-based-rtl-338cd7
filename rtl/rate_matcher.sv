// rate_matcher: turbo-code rate matching (sub-block interleaving, bit
// collection and circular-buffer read-out).
//
// Write state: the three encoder streams arrive one triplet per clock. Each
// goes through its own 32-bit serial-to-parallel register into a
// single-port RAM of RMAX x 32 bits, row by row; the first N_D = 32R - D
// positions of row 0 are the dummy (NULL) bits. Read state: the circular
// buffer w = [v0, v1 and v2 interlaced] is walked from
// k0 = R*(24*rv_idx + 2) (soft buffer = whole buffer, as for the uplink),
// one position per clock, column by column through the permuted columns;
// NULL positions are skipped without output and the walk wraps until E bits
// have been sent. NULLs are recognised from the index, so they are never
// stored. v2 uses the shifted index (P(col) + 32*row + 1) mod K_pi.
// Memories, serial-to-parallel converters and the k0 rule follow the chain
// description; the counter-based read addressing is this design's own.
module rate_matcher import nbiot_pkg::*; #(
  parameter int RMAX = 128,
  parameter int EMAX = 65535,
  localparam int RW = $clog2(RMAX + 1),
  localparam int DWID = $clog2(RMAX * 32 + 1),
  localparam int EW = $clog2(EMAX + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [DWID-1:0] d_len,     // D = K + 4
  input  logic [1:0]      rv,
  input  logic [EW-1:0]   e_len,     // number of output bits E
  input  logic            in_valid,
  input  logic [2:0]      in_d,      // {d2, d1, d0}
  output logic            out_valid,
  output logic            out_bit,
  output logic            out_last,
  output logic            busy
);
  typedef enum logic [1:0] {IDLE, WRITE, READ} state_t;
  state_t st;

  logic [31:0] mem0 [RMAX];
  logic [31:0] mem1 [RMAX];
  logic [31:0] mem2 [RMAX];
  logic [31:0] sp0, sp1, sp2;
  logic [RW-1:0] rows, wrow, r;
  logic [4:0]  nd, wcol, ci, pc, col2;
  logic [DWID-1:0] wcnt, d_len_r;
  logic [EW-1:0] ecnt, e_r;
  logic        par, sub, is_null, sel_bit;
  logic [RW-1:0] row2;
  logic        wrap2;

  // rows needed for D bits: ceil(D/32)
  logic [RW-1:0] rows_c;
  assign rows_c = RW'((d_len + 31) >> 5);

  assign pc   = perm_turbo(ci);
  assign col2 = pc + 5'd1;
  assign row2 = (pc == 5'd31) ? r + 1'b1 : r;
  assign wrap2 = (pc == 5'd31) && (r == rows - 1'b1);   // (P+32r+1) == K_pi -> index 0

  always_comb begin
    if (!par || !sub) begin
      // systematic stream or first parity stream, index P(ci) + 32*r
      is_null = (r == '0) && (pc < nd);
      sel_bit = !par ? mem0[r][pc] : mem1[r][pc];
    end else begin
      // second parity stream, index (P(ci) + 32*r + 1) mod K_pi
      if (wrap2) begin
        is_null = (nd != 5'd0);
        sel_bit = mem2[0][0];
      end else begin
        is_null = (row2 == '0) && (col2 < nd);
        sel_bit = mem2[row2][col2];
      end
    end
  end

  assign busy = (st != IDLE);

  always_ff @(posedge clk) begin
    if (st == WRITE && in_valid && wcol == 5'd31) begin
      mem0[wrow] <= {in_d[0], sp0[30:0]};
      mem1[wrow] <= {in_d[1], sp1[30:0]};
      mem2[wrow] <= {in_d[2], sp2[30:0]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; sp0 <= '0; sp1 <= '0; sp2 <= '0; rows <= '0; wrow <= '0; r <= '0;
      nd <= '0; wcol <= '0; ci <= '0; wcnt <= '0; d_len_r <= '0; ecnt <= '0; e_r <= '0; par <= 1'b0; sub <= 1'b0;
      out_valid <= 1'b0; out_bit <= 1'b0; out_last <= 1'b0;
    end else begin
      out_valid <= 1'b0; out_last <= 1'b0;
      if (start) begin
        st   <= WRITE;
        rows <= rows_c;
        nd   <= 5'((rows_c << 5) - d_len);
        wcol <= 5'((rows_c << 5) - d_len);
        wrow <= '0; wcnt <= '0; e_r <= e_len; d_len_r <= d_len;
        sp0 <= '0; sp1 <= '0; sp2 <= '0;
        // starting column of k0 = R*(24*rv + 2)
        case (rv)
          2'd0: begin par <= 1'b0; ci <= 5'd2;  end
          2'd1: begin par <= 1'b0; ci <= 5'd26; end
          2'd2: begin par <= 1'b1; ci <= 5'd9;  end
          default: begin par <= 1'b1; ci <= 5'd21; end
        endcase
        r <= '0; sub <= 1'b0; ecnt <= '0;
      end else begin
        case (st)
          WRITE: if (in_valid) begin
            sp0[wcol] <= in_d[0]; sp1[wcol] <= in_d[1]; sp2[wcol] <= in_d[2];
            wcol <= wcol + 5'd1;
            wcnt <= wcnt + 1'b1;
            if (wcol == 5'd31) begin
              wrow <= wrow + 1'b1;
              sp0 <= '0; sp1 <= '0; sp2 <= '0;
            end
            if (wcnt == d_len_r - 1'b1) st <= (e_r == '0) ? IDLE : READ;
          end
          READ: begin
            if (!is_null) begin
              out_valid <= 1'b1;
              out_bit   <= sel_bit;
              ecnt      <= ecnt + 1'b1;
              if (ecnt == e_r - 1'b1) begin out_last <= 1'b1; st <= IDLE; end
            end
            // advance the circular-buffer position
            if (par && !sub) sub <= 1'b1;
            else begin
              sub <= 1'b0;
              if (r == rows - 1'b1) begin
                r <= '0;
                if (ci == 5'd31) begin ci <= '0; par <= !par; end
                else ci <= ci + 5'd1;
              end else r <= r + 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
