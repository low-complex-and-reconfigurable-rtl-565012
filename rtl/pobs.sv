// pobs: product-of-base selector (POBS) of one filter tap.
//
// A bank of DBNS_TERMS multiplexers. Multiplexer t routes the POBG output
// named by term t of the tap's control word (x, 3x or 9x) to its output, or 0
// when the term is not used, so a coefficient with fewer terms simply leaves
// multiplexers idle. Inputs are pruned: at elaboration the encoding of every
// N-bit coefficient is scanned (fir_pkg::dbns_inputs_used), and a POBG output
// that no coefficient ever routes to multiplexer t is not wired to it (with
// 8-bit coefficients the third term never needs 9x, so its multiplexer has
// inputs x, 3x and 0 only). The multiplexer bank fed by the POBG and the
// removal of input lines that no coefficient needs follow the double-base
// filter structure; this simple "drop what is never used" rule is this
// design's choice.
//
// Purely combinational. For a control word that edbns_lut cannot produce, a
// pruned selection gives 0.
module pobs
  import fir_pkg::*;
#(
  parameter int unsigned N = DATA_W
) (
  input  logic [2*N-1:0] px   [DBNS_POW3],
  input  dbns_word_t     word,
  output logic [2*N-1:0] sel  [DBNS_TERMS]
);

  localparam logic [DBNS_TERMS*DBNS_POW3-1:0] USED = dbns_inputs_used(N);

  always_comb begin
    for (int t = 0; t < int'(DBNS_TERMS); t++) begin
      sel[t] = '0;
      if (word[t].en) begin
        for (int j = 0; j < int'(DBNS_POW3); j++) begin
          if (USED[t * int'(DBNS_POW3) + j] && int'(word[t].pow3) == j) sel[t] = px[j];
        end
      end
    end
  end

endmodule
