// booth_r8_multiplier: N x N radix-8 modified Booth multiplier for a stored
// multiplicand (one filter tap).
//
// Structure: Booth encoder on the multiplier B -> partial product generator
// on the multiplicand A (0, +-A, +-2A, +-3A, +-4A) -> adder (one carry-save
// layer and a carry look-ahead adder) -> final product A*B. The multiplicand
// comes from a coefficient store together with its hard multiple 3A, which
// the store formed once as 2A + A when A was written, so no 3A adder sits in
// the multiplication path. The encoder / partial product / adder chain and
// the idea of keeping 3A with the stored multiplicand follow the radix-8
// Booth design; the port format is this design's choice. In the filter all
// taps encode the same sample, so their encoders are identical logic that
// synthesis can merge.
//
// Purely combinational.
//   s_u : 1 = operands two's complement, 0 = unsigned (selects how B is
//         extended; A arrives already extended)
//   b   : multiplier (the sample)
//   a   : multiplicand, N+1 bits, sign/zero extended
//   a3  : 3*a, N+3 bits
//   p   : 2N-bit product (two's complement when s_u = 1)
module booth_r8_multiplier
  import fir_pkg::*;
#(
  parameter int unsigned N = DATA_W
) (
  input  logic                s_u,
  input  logic [N-1:0]        b,
  input  logic signed [N:0]   a,
  input  logic signed [N+2:0] a3,
  output logic [2*N-1:0]      p
);

  booth_digit_t digits [3];

  booth_r8_encoder #(.N(N), .ND(3)) u_enc (
    .s_u   (s_u),
    .y     (b),
    .digits(digits)
  );

  booth_r8_product #(.N(N)) u_prod (
    .digits(digits),
    .a     (a),
    .a3    (a3),
    .p     (p)
  );

endmodule
