// edbns_lut: coefficient-to-double-base look-up table.
//
// Addressed by a coefficient, it returns the control word that programs one
// tap of the double-base multiplier: for each of up to DBNS_TERMS terms, an
// enable, a sign, which power-of-three multiple of x (x, 3x or 9x) the
// multiplexer picks, and the left shift applied to it, so that
//   c = sum_t (+-1) * 2^shift_t * 3^pow3_t.
// The table has one entry per value of the sign- or zero-extended 8-bit
// coefficient (-256..255, 512 entries). Its contents are computed at
// elaboration by fir_pkg::dbns_encode, a greedy rule: take the term
// 2^i * 3^j closest to the remainder (the smaller one on a tie), subtract it
// with the remainder's sign, and repeat until the remainder is zero. A table of shifts and selections
// indexed by the coefficient is how the double-base multiplier is programmed;
// the greedy rule, the bases 2 and 3, the term count and the word layout are
// this design's choices.
//
// Purely combinational (a ROM).
//   c    : coefficient, two's complement, N+1 bits (already extended)
//   word : control word for the POBS multiplexers and DBCG shifters
module edbns_lut
  import fir_pkg::*;
#(
  parameter int unsigned N = DATA_W
) (
  input  logic signed [N:0] c,
  output dbns_word_t        word
);

  localparam int unsigned DEPTH = 2 ** (N + 1);

  localparam int unsigned WORD_W = $bits(dbns_word_t);

  typedef logic [WORD_W-1:0] table_t [DEPTH];

  function automatic table_t build_table();
    table_t tbl;
    for (int a = 0; a < int'(DEPTH); a++) begin
      // entry a holds the coefficient whose N+1-bit two's complement code is a
      tbl[a] = WORD_W'(dbns_encode(a >= int'(DEPTH / 2) ? a - int'(DEPTH) : a));
    end
    return tbl;
  endfunction

  localparam table_t TABLE = build_table();

  assign word = dbns_word_t'(TABLE[unsigned'(c)]);

endmodule
