// channel_interleaver: row-in / column-out block interleaver for the
// uplink shared channel.
//
// The G bits of a codeword are written row by row into a matrix of
// N_col = 6*N_slots columns and N_row = G/N_col rows, then read column by
// column. Bits are packed 12 at a time into a word of a RAM of GMAX/12
// words (a row of N_col bits is N_slots/2 words), so the matrix needs no
// flip-flop array. Reading takes one bit per clock: for column c the word
// address starts at c/12 and steps by N_slots/2 per row until the written
// words are used up, and bit c mod 12 of each word is selected.
// A three-state FSM (idle, write, read) controls the RAM. Output has
// valid/ready so the next stages may stall it.
// The matrix shape, 12-bit packing and FSM follow the chain description.
// Interleaving single bits (not Q_m-bit groups) follows the description too.
module channel_interleaver import nbiot_pkg::*; #(
  parameter int GMAX = 2880,
  localparam int NW = GMAX / 12,
  localparam int AW = $clog2(NW + 1),
  localparam int GW = $clog2(GMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [4:0]    n_slots,  // 2, 4, 8 or 16
  input  logic [GW-1:0] g_len,    // G, a multiple of N_col
  input  logic          in_valid,
  input  logic          in_bit,
  output logic          in_ready,
  output logic          out_valid,
  output logic          out_bit,
  output logic          out_last,
  input  logic          out_ready,
  output logic          busy
);
  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_READ} state_t;
  state_t st;

  logic [11:0] ram [NW];
  logic [11:0] pack;
  logic [3:0]  pcnt;
  logic [AW-1:0] waddr, nwords, raddr, wpr;
  logic [GW-1:0] bcnt, g_r;
  logic [6:0]  col, ncol;

  assign in_ready  = (st == S_WRITE);
  assign out_valid = (st == S_READ);
  assign out_bit   = ram[raddr][4'(col % 7'd12)];
  assign busy      = (st != S_IDLE);

  always_ff @(posedge clk) begin
    if (st == S_WRITE && in_valid && pcnt == 4'd11)
      ram[waddr] <= {in_bit, pack[10:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; pack <= '0; pcnt <= '0; waddr <= '0; nwords <= '0; raddr <= '0;
      wpr <= '0; bcnt <= '0; g_r <= '0; col <= '0; ncol <= '0;
    end else if (start) begin
      st <= S_WRITE; pcnt <= '0; waddr <= '0; bcnt <= '0; g_r <= g_len;
      ncol <= 7'(6 * n_slots); wpr <= AW'(n_slots >> 1);
    end else begin
      case (st)
        S_WRITE: if (in_valid) begin
          pack[pcnt] <= in_bit;
          bcnt <= bcnt + 1'b1;
          if (pcnt == 4'd11) begin pcnt <= '0; waddr <= waddr + 1'b1; end
          else pcnt <= pcnt + 4'd1;
          if (bcnt == g_r - 1'b1) begin
            st <= S_READ; nwords <= waddr + 1'b1; col <= '0; raddr <= '0; bcnt <= '0;
          end
        end
        S_READ: if (out_ready) begin
          bcnt <= bcnt + 1'b1;
          if (raddr + wpr >= nwords) begin
            // column finished: next column starts in the first row
            col   <= col + 7'd1;
            raddr <= AW'((col + 7'd1) / 7'd12);
            if (col == ncol - 7'd1) st <= S_IDLE;
          end else raddr <= raddr + wpr;
        end
        default: ;
      endcase
    end
  end

  assign out_last = (st == S_READ) && (col == ncol - 7'd1) && (raddr + wpr >= nwords);
endmodule
