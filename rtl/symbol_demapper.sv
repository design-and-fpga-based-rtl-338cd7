// symbol_demapper: hard-decision QPSK de-mapper.
//
// The sign bit (MSB) of I and of Q of each equalised element decides its
// two bits: negative -> 1, non-negative -> 0, matching the mapper
// (0 -> +1/sqrt2). The bits leave serially, I first, at twice the element
// rate: the I bit one clock after the element, the Q bit the clock after.
// Elements must be at least two clocks apart. Sign-based hard decision
// follows the chain description.
module symbol_demapper import nbiot_pkg::*; (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_re,
  output logic  out_valid,
  output logic  out_bit
);
  logic q_pending, q_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_pending <= 1'b0; q_bit <= 1'b0; out_valid <= 1'b0; out_bit <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        out_valid <= 1'b1; out_bit <= in_re.re[DW-1];
        q_bit <= in_re.im[DW-1]; q_pending <= 1'b1;
      end else if (q_pending) begin
        out_valid <= 1'b1; out_bit <= q_bit; q_pending <= 1'b0;
      end
    end
  end

  a_rate: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && q_pending));
endmodule
