// ul_re_mapper: uplink resource element mapper.
//
// Takes the M transform-precoded symbols of one SC-FDMA symbol (serially,
// valid/ready) and places them on subcarriers sc_start .. sc_start+M-1 of
// the 12-subcarrier resource block; the other subcarriers are zero. The 12
// subcarriers are then laid onto the 16 IFFT inputs around DC: subcarrier
// k < 6 goes to bin k+10 (negative frequencies), k >= 6 to bin k-6, and
// bins 6..9 are guard bins. The finished 16-bin frame is offered with
// out_valid and handed over when out_ready is high; a new symbol is accepted
// only after that. Zero padding and the upper-layer start subcarrier follow
// the chain description; the bin layout is this design's choice and matches
// the receiver's resource element de-mapper.
module ul_re_mapper import nbiot_pkg::*; (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] m_sc,      // 1, 3, 6 or 12
  input  logic [3:0] sc_start,  // first allocated subcarrier
  input  logic       in_valid,
  input  cplx_t      in_sym,
  output logic       in_ready,
  output logic       out_valid,
  output cplx_t      out_bins [16],
  input  logic       out_ready
);
  cplx_t frame [16];
  logic [3:0] i;
  logic full;
  logic [3:0] sc, bin;

  assign sc  = sc_start + i;
  assign bin = (sc < 4'd6) ? sc + 4'd10 : sc - 4'd6;
  assign in_ready  = !full;
  assign out_valid = full;
  always_comb for (int b = 0; b < 16; b++) out_bins[b] = frame[b];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i <= '0; full <= 1'b0;
      for (int b = 0; b < 16; b++) frame[b] <= '0;
    end else if (full) begin
      if (out_ready) begin
        full <= 1'b0;
        for (int b = 0; b < 16; b++) frame[b] <= '0;
      end
    end else if (in_valid) begin
      frame[bin] <= in_sym;
      if (i == m_sc - 4'd1) begin i <= '0; full <= 1'b1; end
      else i <= i + 4'd1;
    end
  end
endmodule
