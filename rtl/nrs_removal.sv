// nrs_removal: parallel-to-serial readout of the resource grid with NRS
// removal.
//
// After start (grid and channel estimate ready) the 12 x 14 grid is read
// symbol by symbol, subcarrier by subcarrier (frequency first). Elements in
// symbols l = 5, 6 of each slot that carry NRS (k mod 6 = N_ID mod 6 for
// l = 5, (N_ID+3) mod 6 for l = 6) are skipped; every other element is sent
// on out_valid together with its subcarrier index, which selects the channel
// estimate for the equalizer. One element is sent every second clock, so
// the QPSK de-mapper that follows, working at twice this rate, emits its
// two bits without back-pressure. 160 elements per subframe; done pulses
// after the last.
// Skipping the NRS and serialising follow the chain description; the
// read order and rate are this design's choice.
module nrs_removal import nbiot_pkg::*; (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [8:0] cell_id,
  output logic [3:0] rd_sc,
  output logic [3:0] rd_sym,
  input  cplx_t      rd_data,
  output logic       out_valid,
  output cplx_t      out_re,
  output logic [3:0] out_sc,
  output logic       done
);
  logic run, phase;
  logic [3:0] sc, sym;
  logic [2:0] l, vsh, k6, base;
  logic is_nrs;

  always_comb begin
    l    = (sym >= 4'd7) ? 3'(sym - 4'd7) : 3'(sym);
    vsh  = 3'(cell_id % 9'd6);
    k6   = 3'(sc % 4'd6);
    base = 3'((int'(vsh) + ((l == 3'd6) ? 3 : 0)) % 6);
    is_nrs = (l == 3'd5 || l == 3'd6) && (k6 == base);
  end

  assign rd_sc  = sc;
  assign rd_sym = sym;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; phase <= 1'b0; sc <= '0; sym <= '0;
      out_valid <= 1'b0; out_re <= '0; out_sc <= '0; done <= 1'b0;
    end else begin
      out_valid <= 1'b0; done <= 1'b0;
      if (start) begin
        run <= 1'b1; phase <= 1'b0; sc <= '0; sym <= '0;
      end else if (run) begin
        if (is_nrs || phase) begin
          // advance to the next element (NRS elements take one clock)
          phase <= 1'b0;
          if (sc == 4'd11) begin
            sc <= '0;
            if (sym == 4'd13) begin run <= 1'b0; done <= 1'b1; end
            else sym <= sym + 4'd1;
          end else sc <= sc + 4'd1;
        end else begin
          out_valid <= 1'b1; out_re <= rd_data; out_sc <= sc;
          phase <= 1'b1;
        end
      end
    end
  end
endmodule
