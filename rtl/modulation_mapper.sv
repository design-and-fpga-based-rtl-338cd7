// modulation_mapper: BPSK / QPSK constellation mapper.
//
// A look-up table maps bits to Q2.14 symbols of amplitude 1/sqrt(2) per
// axis. BPSK: one bit per symbol, 0 -> (1+j)/sqrt2, 1 -> -(1+j)/sqrt2.
// QPSK: two bits per symbol, the first sets the sign of I and the second the
// sign of Q (0 -> +, 1 -> -). The first QPSK bit is held in a register; the
// symbol is presented combinationally with the bit that completes it, so a
// BPSK symbol takes one cycle and a QPSK symbol two, as in the chain
// description. Valid/ready on both sides.
module modulation_mapper import nbiot_pkg::*; (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,     // clears a pending half symbol
  input  logic  qpsk,      // 1: QPSK, 0: BPSK
  input  logic  in_valid,
  input  logic  in_bit,
  output logic  in_ready,
  output logic  out_valid,
  output cplx_t out_sym,
  input  logic  out_ready
);
  logic have_first, first_bit;
  logic [1:0] idx;
  cplx_t lut [4];

  // LUT indexed by {I bit, Q bit}
  assign lut[0] = '{re:  AMP, im:  AMP};
  assign lut[1] = '{re:  AMP, im: -AMP};
  assign lut[2] = '{re: -AMP, im:  AMP};
  assign lut[3] = '{re: -AMP, im: -AMP};

  always_comb begin
    if (!qpsk) begin
      idx       = {in_bit, in_bit};
      out_valid = in_valid;
      in_ready  = out_ready;
    end else begin
      idx       = {first_bit, in_bit};
      out_valid = in_valid && have_first;
      in_ready  = have_first ? out_ready : 1'b1;
    end
    out_sym = lut[idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_first <= 1'b0; first_bit <= 1'b0;
    end else if (start) begin
      have_first <= 1'b0;
    end else if (qpsk && in_valid && in_ready) begin
      have_first <= !have_first;
      if (!have_first) first_bit <= in_bit;
    end
  end
endmodule
