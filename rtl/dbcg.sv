// dbcg: double-base coefficient generator (DBCG) of one filter tap.
//
// Each selected power-of-three multiple passes through a programmable left
// shifter (multiplication by 2^shift) and, for a subtracted term, a two's
// complement negation. The DBNS_TERMS double-base terms are then summed by a
// carry-save layer (the CSA tree for three terms) and a carry look-ahead
// adder, giving the tap product c * x. The shifters and the CSA summation
// follow the double-base filter structure; the negation at this point and
// the final adder type are this design's choices.
//
// Purely combinational.
//   sel  : POBS outputs, one per term
//   word : the tap's control word (shift and sign per term)
//   p    : product, 2N bits (modulo 2^(2N), read signed or unsigned per s_u)
module dbcg
  import fir_pkg::*;
#(
  parameter int unsigned N = DATA_W
) (
  input  logic [2*N-1:0] sel  [DBNS_TERMS],
  input  dbns_word_t     word,
  output logic [2*N-1:0] p
);

  localparam int unsigned OW = 2 * N;

  if (DBNS_TERMS != 3) begin : g_bad_terms
    $error("dbcg sums exactly three double-base terms with one CSA layer");
  end

  logic [OW-1:0] term [DBNS_TERMS];
  logic [OW-1:0] cs_sum, cs_carry;
  logic          unused_cout;

  always_comb begin
    for (int t = 0; t < int'(DBNS_TERMS); t++) begin
      logic [OW-1:0] shifted;
      shifted = sel[t] << word[t].shift;
      term[t] = word[t].neg ? ~shifted + OW'(1) : shifted;
    end
  end

  csa_3to2 #(.WIDTH(OW)) u_csa (
    .x    (term[0]),
    .y    (term[1]),
    .z    (term[2]),
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
