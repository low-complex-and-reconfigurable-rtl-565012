// triple_gen: forms the hard radix-8 multiple 3A as 2A + A.
//
// Radix-8 Booth digits include +-3, and 3A is the one multiple that is not a
// plain shift of A. It is produced by adding A to A shifted left one place,
// with the carry look-ahead adder. In the filter the multiplicands are the
// coefficients, which are known ahead of time, so 3A is formed once when a
// coefficient is written and kept next to it rather than on every multiply;
// that reuse follows the design idea, the widths are this design's choice.
//
// Purely combinational. a is a two's complement value of AW bits (already
// sign- or zero-extended by the caller); a3 = 3*a, exact in AW+2 bits.
module triple_gen #(
  parameter int unsigned AW = 9
) (
  input  logic signed [AW-1:0] a,
  output logic signed [AW+1:0] a3
);

  logic [AW+1:0] a_x1, a_x2, s;
  logic          co;

  assign a_x1 = {{2{a[AW-1]}}, a};
  assign a_x2 = {a[AW-1], a, 1'b0};

  cla_adder #(.WIDTH(AW + 2)) u_add (
    .a   (a_x2),
    .b   (a_x1),
    .cin (1'b0),
    .sum (s),
    .cout(co)
  );

  assign a3 = signed'(s);

endmodule
