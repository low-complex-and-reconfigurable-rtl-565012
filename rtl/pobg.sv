// pobg: product-of-base generator (POBG) of the double-base multiplier.
//
// Forms the multiples of the input sample by the powers of the second base,
// x * 3^j for j = 0..DBNS_POW3-1, with shift-and-add adders: 3x = 2x + x and
// 9x = 8x + x. One POBG serves every tap, since all taps of the transposed
// filter multiply the same sample. That every power-of-base multiple is made
// once, here, and shared follows the double-base filter structure; the base 3
// and the count of three multiples are this design's choices.
//
// Purely combinational.
//   x  : sample, N+1 bits two's complement (sign- or zero-extended)
//   px : px[j] = x * 3^j, in 2N-bit two's complement (modulo 2^(2N))
module pobg
  import fir_pkg::*;
#(
  parameter int unsigned N = DATA_W
) (
  input  logic signed [N:0]  x,
  output logic [2*N-1:0]     px [DBNS_POW3]
);

  localparam int unsigned OW = 2 * N;

  logic [OW-1:0] x1;

  assign x1    = OW'(x);
  assign px[0] = x1;
  assign px[1] = (x1 << 1) + x1;   // 3x
  assign px[2] = (x1 << 3) + x1;   // 9x

endmodule
