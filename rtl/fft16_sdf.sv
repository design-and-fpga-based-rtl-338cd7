// fft16_sdf: 16-point FFT, single-path delay-feedback pipeline with
// parallelism 1 (one sample per clock).
//
// Four sdf_stage instances with feedback delays 8, 4, 2 and 1. Only the
// first two stages need general twiddle multipliers; the third multiplies
// by 1 or -j and the fourth by 1, as in a radix-2^2 SDF. The stages advance
// only on valid samples, so the input may have gaps. Results are scaled by
// 1/16 and come out in bit-reversed bin order (out_idx gives the bin); the
// re-ordering is left to the storage that follows. A symbol's 16 bins leave
// while the next symbol's 16 samples enter, so the last symbol of a burst
// needs 16 further samples (e.g. zeros) to be pushed out.
// The SDF structure with P = 1 and bit reversal done in the following
// storage follow the chain description; folding the fourth stage onto the
// first is not reproduced here.
module fft16_sdf import nbiot_pkg::*; (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       in_valid,
  input  cplx_t      in_smp,
  output logic       out_valid,
  output cplx_t      out_smp,
  output logic [3:0] out_idx    // bin index of out_smp
);
  logic  v [5];
  cplx_t d [5];
  logic [3:0] pos;

  assign v[0] = in_valid;
  assign d[0] = in_smp;

  for (genvar s = 0; s < 4; s++) begin : g_stage
    sdf_stage #(.D(8 >> s)) u_st (
      .clk, .rst_n, .clear, .in_valid(v[s]), .in_smp(d[s]), .out_valid(v[s+1]), .out_smp(d[s+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         pos <= '0;
    else if (clear)     pos <= '0;
    else if (v[4])      pos <= pos + 4'd1;
  end

  assign out_valid = v[4];
  assign out_smp   = d[4];
  assign out_idx   = {pos[0], pos[1], pos[2], pos[3]};
endmodule
