// scrambler: bit scrambler / de-scrambler (the same circuit serves both).
//
// Each bit is XOR-ed with the Gold sequence c(n) from gold_seq. init loads
// c_init (n_RNTI*2^14 + q*2^13 + floor(n_s/2)*2^9 + N_ID^cell, formed by the
// caller) and starts the 1600-step fast-forward; ready rises when it ends,
// so initialisation can overlap the preceding processing. The XOR is
// combinational: out_valid = in_valid & ready, in_ready = out_ready & ready,
// and the sequence advances on every accepted bit.
module scrambler import nbiot_pkg::*; #(
  parameter int NC = GOLD_NC
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic [30:0] c_init,
  output logic        ready,
  input  logic        in_valid,
  input  logic        in_bit,
  output logic        in_ready,
  output logic        out_valid,
  output logic        out_bit,
  input  logic        out_ready
);
  logic c, seq_ready, take;

  gold_seq #(.NC(NC)) u_gold (
    .clk, .rst_n, .init, .c_init, .advance(take), .ready(seq_ready), .c
  );

  assign ready     = seq_ready;
  assign in_ready  = out_ready && seq_ready;
  assign out_valid = in_valid && seq_ready;
  assign out_bit   = in_bit ^ c;
  assign take      = in_valid && in_ready;
endmodule
