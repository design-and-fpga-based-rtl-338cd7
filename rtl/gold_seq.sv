// gold_seq: length-31 Gold pseudo-random sequence generator c(n).
//
// Two 31-bit LFSRs, x1 (x1(n+31) = x1(n+3)+x1(n)) and x2
// (x2(n+31) = x2(n+3)+x2(n+2)+x2(n+1)+x2(n)), are XOR-ed. On init x1 is
// loaded with 1,0,...,0 and x2 with c_init; the registers are then stepped
// NC (1600) times, one step per clock, before ready rises. After that every
// cycle with advance high steps once; c is the current bit c(n).
// Structure and initialisation follow the chain description; the
// one-step-per-clock fast-forward is this design's choice.
module gold_seq import nbiot_pkg::*; #(
  parameter int NC = GOLD_NC
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic [30:0] c_init,
  input  logic        advance,
  output logic        ready,
  output logic        c
);
  logic [30:0] x1, x2;
  logic [$clog2(NC+1)-1:0] cnt;
  logic        busy;

  assign c     = x1[0] ^ x2[0];
  assign ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= 31'd1; x2 <= '0; cnt <= '0; busy <= 1'b1;
    end else if (init) begin
      x1 <= 31'd1; x2 <= c_init; cnt <= '0; busy <= (NC != 0);
    end else if (busy || advance) begin
      x1 <= {x1[3] ^ x1[0], x1[30:1]};
      x2 <= {x2[3] ^ x2[2] ^ x2[1] ^ x2[0], x2[30:1]};
      if (busy) begin
        cnt <= cnt + 1'b1;
        if (cnt == ($bits(cnt))'(NC - 1)) busy <= 1'b0;
      end
    end
  end
endmodule
