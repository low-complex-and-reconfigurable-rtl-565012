// booth_r8_encoder: radix-8 modified Booth encoder (BE).
//
// The N-bit multiplier y is extended by one bit on top (y[N-1] when s_u = 1,
// i.e. signed, 0 when s_u = 0, i.e. unsigned) and a 0 is appended below its
// LSB. The result is cut into overlapping quartets that step by three bits:
// for N = 8 these are {y2 y1 y0 0}, {y5 y4 y3 y2} and {ext y7 y6 y5}. Each
// quartet q3 q2 q1 q0 is recoded into the signed digit -4*q3 + 2*q2 + q1 + q0,
// which lies in -4..+4, so y equals the sum of digit[i] * 8^i. The recoding
// table, the quartet grouping and the s_u-controlled extension bit follow
// the radix-8 Booth scheme the filter is built on; the sign/one-hot digit
// format is this design's choice.
//
// Purely combinational; no clock.
//   s_u    : 1 = y is two's complement, 0 = y is unsigned
//   y      : multiplier (in the filter, the input sample x[n])
//   digits : digits[0] is the least significant digit
module booth_r8_encoder
  import fir_pkg::*;
#(
  parameter int unsigned N  = DATA_W,
  parameter int unsigned ND = booth_r8_digits(N)
) (
  input  logic                s_u,
  input  logic [N-1:0]        y,
  output booth_digit_t        digits [ND]
);

  // Extended operand with the appended 0 at bit 0: width 3*ND + 1.
  logic [3*ND:0] ext;

  always_comb begin
    ext = '0;
    ext[N:1] = y;
    for (int unsigned b = N + 1; b <= 3 * ND; b++) ext[b] = s_u & y[N-1];
  end

  always_comb begin
    for (int unsigned i = 0; i < ND; i++) begin
      logic [3:0] q;
      q = ext[3*i +: 4];
      digits[i] = BOOTH_ZERO;
      unique case (q)
        4'b0000, 4'b1111: digits[i] = BOOTH_ZERO;
        4'b0001, 4'b0010: digits[i].one   = 1'b1;
        4'b0011, 4'b0100: digits[i].two   = 1'b1;
        4'b0101, 4'b0110: digits[i].three = 1'b1;
        4'b0111:          digits[i].four  = 1'b1;
        4'b1000:          begin digits[i].neg = 1'b1; digits[i].four  = 1'b1; end
        4'b1001, 4'b1010: begin digits[i].neg = 1'b1; digits[i].three = 1'b1; end
        4'b1011, 4'b1100: begin digits[i].neg = 1'b1; digits[i].two   = 1'b1; end
        4'b1101, 4'b1110: begin digits[i].neg = 1'b1; digits[i].one   = 1'b1; end
        default:          digits[i] = BOOTH_ZERO;
      endcase
    end
  end

endmodule
