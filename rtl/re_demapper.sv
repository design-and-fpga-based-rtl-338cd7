// re_demapper: downlink resource element de-mapper.
//
// FFT outputs (bit-reversed order, with their bin index) are written into a
// 16 x 14 storage memory at their bin address, which undoes the bit
// reversal. After 14 OFDM symbols (one subframe) the storage is full and is
// copied to the 12 x 14 resource grid one symbol column per clock (14
// clocks); on the way the 16 bins are re-sorted: bins 10..15 (negative
// frequencies) become subcarriers 0..5 and bins 0..5 subcarriers 6..11.
// grid_ready then pulses and the grid stays unchanged until the next
// subframe has been stored, while channel estimation, equalisation and the
// readout use the random-access port (rd_sc, rd_sym) -> rd_data, which is
// combinational. The second read port feeds the channel estimator.
// Storage sizes, bit reversal at the storage and the half swap follow the
// chain description.
module re_demapper import nbiot_pkg::*; (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       in_valid,
  input  cplx_t      in_re,
  input  logic [3:0] in_bin,
  output logic       grid_ready,
  input  logic [3:0] rd_sc,
  input  logic [3:0] rd_sym,
  output cplx_t      rd_data,
  input  logic [3:0] rd2_sc,
  input  logic [3:0] rd2_sym,
  output cplx_t      rd2_data
);
  cplx_t store [14][16];
  cplx_t grid  [14][12];
  logic [3:0] wsym, wcnt, csym;
  logic copying;

  assign rd_data  = grid[rd_sym][rd_sc];
  assign rd2_data = grid[rd2_sym][rd2_sc];

  always_ff @(posedge clk) begin
    if (in_valid) store[wsym][in_bin] <= in_re;
    if (copying)
      for (int k = 0; k < 12; k++)
        grid[csym][k] <= store[csym][(k < 6) ? k + 10 : k - 6];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsym <= '0; wcnt <= '0; csym <= '0; copying <= 1'b0; grid_ready <= 1'b0;
    end else begin
      grid_ready <= 1'b0;
      if (clear) begin
        wsym <= '0; wcnt <= '0; copying <= 1'b0;
      end else begin
        if (copying) begin
          csym <= csym + 4'd1;
          if (csym == 4'd13) begin copying <= 1'b0; grid_ready <= 1'b1; end
        end
        if (in_valid) begin
        wcnt <= wcnt + 4'd1;
        if (wcnt == 4'd15) begin
          if (wsym == 4'd13) begin wsym <= '0; copying <= 1'b1; csym <= '0; end
          else wsym <= wsym + 4'd1;
        end
        end
      end
    end
  end

  // the copy (14 clocks) must end before the first symbol of the next
  // subframe is complete; column 0 is copied first, so the next
  // subframe's first symbol may already be written meanwhile
  a_copy_before_next_symbol: assert property (@(posedge clk) disable iff (!rst_n)
    !(copying && in_valid && wcnt == 4'd15));
endmodule
