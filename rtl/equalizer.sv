// equalizer: one-tap zero-forcing channel equalizer for hard decisions.
//
// Dividing a received element s by the channel estimate h equals
// s * conj(h) / |h|^2. The positive scale 1/|h|^2 does not change the signs
// that the hard-decision de-mapper uses, so the divider is replaced by a
// complex multiplier: y = s * conj(h) (Q2.14), registered, one element per
// clock with one clock of latency. The sc index travels with the data.
// The multiplier-instead-of-divider choice follows the chain description;
// dropping the 1/|h|^2 scale (valid only for hard decisions) is this
// design's.
module equalizer import nbiot_pkg::*; (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  cplx_t      in_re,
  input  cplx_t      h,
  output logic       out_valid,
  output cplx_t      out_re
);
  cplx_t hc;
  assign hc = '{re: h.re, im: -h.im};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_re <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_re <= cmul(in_re, hc);
    end
  end
endmodule
