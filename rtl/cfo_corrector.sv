// cfo_corrector: carrier frequency offset cancellation.
//
// Multiplies each received sample b(n) by exp(-j*2*pi*eps*n/N). A phase
// accumulator adds phase_inc (eps/N in units of 2*pi/2^16, i.e. the
// integer plus fractional offset estimate) once per valid sample, and the
// CORDIC rotator turns the sample by minus the accumulated phase.
// clear restarts the accumulator at phase 0 (start of a burst).
// Latency is that of the rotator (17 clocks), one sample per clock.
// Phase accumulator plus CORDIC rotation follow the chain description.
module cfo_corrector import nbiot_pkg::*; (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic [15:0] phase_inc,
  input  logic        in_valid,
  input  cplx_t       in_smp,
  output logic        out_valid,
  output cplx_t       out_smp
);
  logic [15:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        phase <= '0;
    else if (clear)    phase <= '0;
    else if (in_valid) phase <= phase + phase_inc;
  end

  cordic_rotator #(.STAGES(15)) u_rot (
    .clk, .rst_n, .in_valid, .in_smp, .angle(16'(-phase)), .out_valid, .out_smp
  );
endmodule
