// cordic_rotator: pipelined CORDIC in rotation mode.
//
// Rotates a complex sample by an angle given in units of 2*pi/2^16.
// A pre-rotation by 0 or 180 degrees brings the angle into (-90, 90]
// degrees; then STAGES micro-rotations (x,y,z) -> (x -/+ y*2^-i,
// y +/- x*2^-i, z -/+ atan(2^-i)) run one per pipeline stage, and a final
// multiply by 1/K (K = 1.6468, the CORDIC gain) restores the amplitude.
// Latency STAGES + 2 clocks, one sample per clock. Internal width DW+2.
// The rotation mode and 15 stages follow the chain description; the
// gain-compensating multiplier at the output is this design's choice.
module cordic_rotator import nbiot_pkg::*; #(
  parameter int STAGES = 15
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cplx_t       in_smp,
  input  logic [15:0] angle,      // rotate by +angle
  output logic        out_valid,
  output cplx_t       out_smp
);
  localparam int IW = DW + 2;

  function automatic logic [15:0] atan_tab(input int i);
    case (i)
      0: return 16'd8192;  1: return 16'd4836; 2: return 16'd2555; 3: return 16'd1297;
      4: return 16'd651;   5: return 16'd326;  6: return 16'd163;  7: return 16'd81;
      8: return 16'd41;    9: return 16'd20;   10: return 16'd10;  11: return 16'd5;
      12: return 16'd3;    13: return 16'd1;   14: return 16'd1;   default: return 16'd0;
    endcase
  endfunction

  logic signed [IW-1:0] xs [STAGES+1];
  logic signed [IW-1:0] ys [STAGES+1];
  logic signed [15:0]   zs [STAGES+1];
  logic [STAGES+1:0]    vs;

  // pre-rotation stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs[0] <= '0; ys[0] <= '0; zs[0] <= '0; vs[0] <= 1'b0;
    end else begin
      vs[0] <= in_valid;
      if (angle[15] ^ angle[14]) begin   // 90..270 degrees: rotate by 180 first
        xs[0] <= -IW'(in_smp.re); ys[0] <= -IW'(in_smp.im);
        zs[0] <= $signed(angle - 16'h8000);
      end else begin
        xs[0] <= IW'(in_smp.re);  ys[0] <= IW'(in_smp.im);
        zs[0] <= $signed(angle);
      end
    end
  end

  for (genvar i = 0; i < STAGES; i++) begin : g_st
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[i+1] <= '0; ys[i+1] <= '0; zs[i+1] <= '0; vs[i+1] <= 1'b0;
      end else begin
        vs[i+1] <= vs[i];
        if (zs[i] >= 0) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - $signed(atan_tab(i));
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + $signed(atan_tab(i));
        end
      end
    end
  end

  // gain compensation, 1/1.64676 = 9949/16384
  logic signed [IW+15:0] gx, gy;
  assign gx = xs[STAGES] * 16'sd9949;
  assign gy = ys[STAGES] * 16'sd9949;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_smp <= '0; vs[STAGES+1] <= 1'b0;
    end else begin
      vs[STAGES+1] <= vs[STAGES];
      out_smp.re <= DW'(gx >>> FRAC);
      out_smp.im <= DW'(gy >>> FRAC);
    end
  end
  assign out_valid = vs[STAGES+1];
endmodule
