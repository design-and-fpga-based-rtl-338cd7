// crc24: serial CRC24A generator (transmitter) and checker (receiver).
//
// A 24-bit LFSR divides the bit stream by the CRC24A polynomial
// D^24+D^23+D^18+D^17+D^14+D^11+D^10+D^7+D^6+D^5+D^4+D^3+D+1, one bit per
// clock. Data bits are passed through unchanged with one cycle of latency.
// With CHECK = 0 the block appends the 24 parity bits (MSB first) after the
// bit flagged in_last; in_ready is low while they are shifted out. With
// CHECK = 1 nothing is appended and, one cycle after the last bit, crc_ok
// reports whether the remainder of data plus received parity is zero.
// The polynomial and the transmit/receive use follow the chain description;
// the remainder form (data pre-multiplied by D^24) is the usual LTE one.
module crc24 import nbiot_pkg::*; #(
  parameter bit CHECK = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,      // clears the register for a new transport block
  input  logic in_valid,
  input  logic in_bit,
  input  logic in_last,
  output logic in_ready,
  output logic out_valid,
  output logic out_bit,
  output logic out_last,
  output logic done,       // pulses with the last output bit (or check result)
  output logic crc_ok
);
  logic [23:0] r;
  logic        appending;
  logic [4:0]  acnt;
  logic [23:0] nxt;

  assign in_ready = !appending;
  assign nxt = {r[22:0], 1'b0} ^ ((r[23] ^ in_bit) ? CRC24_POLY : 24'h0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0; appending <= 1'b0; acnt <= '0;
      out_valid <= 1'b0; out_bit <= 1'b0; out_last <= 1'b0; done <= 1'b0; crc_ok <= 1'b0;
    end else begin
      out_valid <= 1'b0; out_last <= 1'b0; done <= 1'b0;
      if (start) begin
        r <= '0; appending <= 1'b0; acnt <= '0;
      end else if (appending) begin
        out_valid <= 1'b1;
        out_bit   <= r[23];
        r         <= {r[22:0], 1'b0};
        acnt      <= acnt + 5'd1;
        if (acnt == 5'd23) begin
          appending <= 1'b0; out_last <= 1'b1; done <= 1'b1;
        end
      end else if (in_valid) begin
        r         <= nxt;
        out_valid <= 1'b1;
        out_bit   <= in_bit;
        if (in_last) begin
          if (CHECK) begin
            crc_ok <= (nxt == 24'h0); done <= 1'b1; out_last <= 1'b1;
          end else begin
            appending <= 1'b1; acnt <= '0;
          end
        end
      end
    end
  end
endmodule
