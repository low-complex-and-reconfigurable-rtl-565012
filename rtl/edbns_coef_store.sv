// edbns_coef_store: coefficient store of the double-base filter taps.
//
// A coefficient write is translated once, through the shared edbns_lut, into
// the tap's double-base control word (multiplexer selections, shifts and
// signs), and that word is what the tap register keeps. The taps therefore
// never hold the binary coefficient: reprogramming the filter is a LUT
// read per coefficient. Addressing the shift/selection LUT by the
// coefficient follows the double-base filter structure; translating at write
// time with one shared LUT is this design's choice.
//
// Timing: a write (we = 1) takes effect at the rising clock edge; the new word
// is visible in the next cycle. All words are read in parallel. An
// asynchronous active-low reset clears every word, which is the coefficient 0
// (no term enabled). s_u (1 = signed) sets how wdata is extended at the write.
module edbns_coef_store
  import fir_pkg::*;
#(
  parameter int unsigned N    = DATA_W,
  parameter int unsigned NTAP = TAPS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    s_u,
  input  logic                    we,
  input  logic [$clog2(NTAP)-1:0] addr,
  input  logic [N-1:0]            wdata,
  output dbns_word_t              words [NTAP]
);

  logic signed [N:0] w_ext;
  dbns_word_t        w_word;

  assign w_ext = signed'({s_u & wdata[N-1], wdata});

  edbns_lut #(.N(N)) u_lut (
    .c   (w_ext),
    .word(w_word)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NTAP); i++) words[i] <= '0;
    end else if (we) begin
      words[addr] <= w_word;
    end
  end

endmodule
