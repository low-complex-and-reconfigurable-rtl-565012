// booth_r8_product: partial product generation and summation for one radix-8
// Booth multiplication whose multiplier has already been encoded.
//
// Three Booth selectors form digit[i] * A; each partial product is sign
// extended to the product width and placed at weight 8^i (shifted 3*i places).
// A carry-save layer (the Wallace tree for three rows) reduces them to a sum
// and a carry row, and the carry look-ahead adder adds those two rows into the
// product. Keeping the encoder outside lets one encoder serve every tap of the
// transposed filter, which all multiply the same input sample; that sharing
// is this design's choice.
//
// Purely combinational.
//   digits : encoded multiplier (booth_r8_encoder)
//   a      : multiplicand, AW = N+1 bits, sign/zero extended
//   a3     : 3*a
//   p      : product, 2N bits; for N = 8 the exact signed (s_u = 1) or unsigned
//            (s_u = 0) product of two 8-bit operands fits.
module booth_r8_product
  import fir_pkg::*;
#(
  parameter int unsigned N = DATA_W
) (
  input  booth_digit_t          digits [3],
  input  logic signed [N:0]     a,
  input  logic signed [N+2:0]   a3,
  output logic [2*N-1:0]        p
);

  localparam int unsigned AW = N + 1;
  localparam int unsigned PW = AW + 3;
  localparam int unsigned OW = 2 * N;

  if (booth_r8_digits(N) != 3) begin : g_bad_width
    $error("booth_r8_product is built for multipliers of 6 to 8 bits (three Booth digits)");
  end

  logic signed [PW-1:0] pp  [3];
  logic        [OW-1:0] row [3];
  logic        [OW-1:0] cs_sum, cs_carry;
  logic                 unused_cout;

  for (genvar i = 0; i < 3; i++) begin : g_pp
    booth_r8_ppgen #(.AW(AW)) u_ppgen (
      .a  (a),
      .a3 (a3),
      .d  (digits[i]),
      .pp (pp[i])
    );
    // Sign extend to the product width, then weight by 8^i.
    assign row[i] = OW'(OW'(signed'(pp[i])) << (3 * i));
  end

  csa_3to2 #(.WIDTH(OW)) u_csa (
    .x    (row[0]),
    .y    (row[1]),
    .z    (row[2]),
    .sum  (cs_sum),
    .carry(cs_carry)
  );

  cla_adder #(.WIDTH(OW)) u_cla (
    .a   (cs_sum),
    .b   (cs_carry),
    .cin (1'b0),
    .sum (p),
    .cout(unused_cout)
  );

endmodule
