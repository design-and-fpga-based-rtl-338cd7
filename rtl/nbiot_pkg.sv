// nbiot_pkg: types and constants shared by the NB-IoT uplink transmitter and
// downlink receiver chains.
//
// Samples and resource elements are complex 16-bit two's-complement numbers
// in Q2.14 (1.0 = 16384). The constellation amplitude 1/sqrt(2) is 11585.
// The tables here (sub-block interleaver permutations, 16- and 12-point
// twiddles, CORDIC arctangents) are the standard 3GPP / DSP constants; the
// fixed-point format is this design's own choice.
package nbiot_pkg;

  localparam int DW = 16;                       // sample width
  localparam int FRAC = 14;                     // fractional bits of Q2.14
  localparam logic signed [DW-1:0] AMP = 16'sd11585; // 1/sqrt(2)

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // CRC24A generator polynomial without the D^24 term (eq. 1)
  localparam logic [23:0] CRC24_POLY = 24'h864CFB;

  // Gold sequence fast-forward (N_c)
  localparam int GOLD_NC = 1600;

  // Sub-block interleaver inter-column permutation for turbo-coded streams
  function automatic logic [4:0] perm_turbo(input logic [4:0] c);
    logic [4:0] p;
    // turbo pattern is the bit reversal of c
    p = {c[0], c[1], c[2], c[3], c[4]};
    return p;
  endfunction

  // Sub-block interleaver permutation for convolutionally coded streams:
  // bit-reversed column index with the two halves swapped
  function automatic logic [4:0] perm_conv(input logic [4:0] c);
    logic [4:0] p;
    p = {c[0], c[1], c[2], c[3], c[4]};
    return p ^ 5'd1;
  endfunction

  // cos/sin of 2*pi*k/16 in Q2.14
  function automatic logic signed [DW-1:0] cos16(input logic [3:0] k);
    logic signed [DW-1:0] t [0:4];
    logic [1:0] q;
    logic [1:0] r;
    t[0] = 16'sd16384; t[1] = 16'sd15137; t[2] = 16'sd11585; t[3] = 16'sd6270; t[4] = 16'sd0;
    q = k[3:2]; r = k[1:0];
    case (q)
      2'd0: return t[{1'b0, r}];
      2'd1: return -t[3'd4 - {1'b0, r}];
      2'd2: return -t[{1'b0, r}];
      default: return t[3'd4 - {1'b0, r}];
    endcase
  endfunction

  function automatic logic signed [DW-1:0] sin16(input logic [3:0] k);
    return cos16(k - 4'd4);
  endfunction

  // cos/sin of 2*pi*k/12 in Q2.14
  function automatic logic signed [DW-1:0] cos12(input logic [3:0] k);
    case (k)
      4'd0: return 16'sd16384;  4'd1: return 16'sd14189;  4'd2: return 16'sd8192;
      4'd3: return 16'sd0;      4'd4: return -16'sd8192;  4'd5: return -16'sd14189;
      4'd6: return -16'sd16384; 4'd7: return -16'sd14189; 4'd8: return -16'sd8192;
      4'd9: return 16'sd0;      4'd10: return 16'sd8192;  default: return 16'sd14189;
    endcase
  endfunction

  function automatic logic signed [DW-1:0] sin12(input logic [3:0] k);
    logic [3:0] m;
    m = (k >= 4'd3) ? k - 4'd3 : k + 4'd9;
    return cos12(m);
  endfunction

  // Complex product of two Q2.14 numbers, result in Q2.14 (truncating)
  function automatic cplx_t cmul(input cplx_t a, input cplx_t b);
    logic signed [2*DW:0] pr, pi;
    cplx_t o;
    pr = a.re * b.re - a.im * b.im;
    pi = a.re * b.im + a.im * b.re;
    o.re = DW'(pr >>> FRAC);
    o.im = DW'(pi >>> FRAC);
    return o;
  endfunction

  // Hard-decision QPSK/BPSK value: bit 0 -> +AMP, bit 1 -> -AMP
  function automatic logic signed [DW-1:0] bit2amp(input logic b);
    return b ? -AMP : AMP;
  endfunction

endpackage
