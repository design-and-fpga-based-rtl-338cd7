// nrs_gen: narrowband reference signal (NRS) generator for one OFDM symbol.
//
// On start it forms c_init = 2^10*(7*(n_s+1)+l+1)*(2*N_ID+1) + 2*N_ID + 1
// (normal CP), runs the Gold sequence fast-forward, and reads c(0..3). The
// two pilots m = 0, 1 are r(m) = ((1-2c(2m)) + j(1-2c(2m+1)))/sqrt(2) in
// Q2.14, placed on subcarriers k = 6m + (v + N_ID mod 6) mod 6 with v = 0
// for l = 5 and v = 3 for l = 6. done pulses when pilot and k outputs are
// valid; about 1605 clocks after start.
// Formulas follow the chain description (one PRB, m = 0 or 1).
module nrs_gen import nbiot_pkg::*; (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [4:0] ns,        // slot number
  input  logic [2:0] l,         // 5 or 6
  input  logic [8:0] cell_id,
  output logic       done,
  output cplx_t      pilot [2],
  output logic [3:0] k_pos [2]
);
  logic [30:0] c_init;
  logic seq_ready, c, adv, running, init_d;
  logic [1:0] bcnt;
  logic [3:0] bits;
  logic [2:0] vsh, base;

  always_comb begin
    logic [31:0] t;
    t = 32'(7 * (int'(ns) + 1) + int'(l) + 1) * 32'(2 * int'(cell_id) + 1);
    c_init = 31'((t << 10) + 32'(2 * int'(cell_id)) + 32'd1);
  end

  gold_seq u_gold (.clk, .rst_n, .init(start), .c_init, .advance(adv), .ready(seq_ready), .c);
  assign adv = running && seq_ready && !init_d;

  always_comb begin
    vsh  = 3'(cell_id % 9'd6);
    base = 3'((int'(vsh) + ((l == 3'd6) ? 3 : 0)) % 6);
    k_pos[0] = {1'b0, base};
    k_pos[1] = 4'(base + 4'd6);
    pilot[0].re = bit2amp(bits[0]); pilot[0].im = bit2amp(bits[1]);
    pilot[1].re = bit2amp(bits[2]); pilot[1].im = bit2amp(bits[3]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; bcnt <= '0; bits <= '0; done <= 1'b0; init_d <= 1'b0;
    end else begin
      done <= 1'b0;
      init_d <= start;
      if (start) begin
        running <= 1'b1; bcnt <= '0;
      end else if (adv) begin
        bits[bcnt] <= c;
        bcnt <= bcnt + 2'd1;
        if (bcnt == 2'd3) begin running <= 1'b0; done <= 1'b1; end
      end
    end
  end
endmodule
