// booth_r8_ppgen: radix-8 Booth selector / partial product generator (BS).
//
// For one Booth digit it outputs digit * A: 0, +-A, +-2A, +-3A or +-4A. The
// multiples 2A and 4A are A shifted left by one and two places, 3A is taken
// ready-made from the caller (precomputed as 2A + A), and a negative digit
// takes the two's complement of the selected multiple. The set of multiples
// and how each is formed follow the radix-8 Booth scheme; forming the negation
// as invert-plus-one inside this block is this design's choice.
//
// Purely combinational.
//   a   : multiplicand, two's complement, AW bits (sign/zero extended)
//   a3  : 3*a, AW+2 bits
//   d   : Booth digit
//   pp  : digit * a, two's complement, AW+3 bits (holds -4a and +4a exactly)
module booth_r8_ppgen
  import fir_pkg::*;
#(
  parameter int unsigned AW = 9
) (
  input  logic signed [AW-1:0] a,
  input  logic signed [AW+1:0] a3,
  input  booth_digit_t         d,
  output logic signed [AW+2:0] pp
);

  localparam int unsigned PW = AW + 3;

  logic [PW-1:0] mag;

  always_comb begin
    unique case (1'b1)
      d.one:   mag = PW'({{3{a[AW-1]}}, a});
      d.two:   mag = PW'({{2{a[AW-1]}}, a, 1'b0});
      d.three: mag = PW'({a3[AW+1], a3});
      d.four:  mag = PW'({a[AW-1], a, 2'b00});
      default: mag = '0;
    endcase
    pp = d.neg ? signed'(~mag + PW'(1)) : signed'(mag);
  end

endmodule
