// tb_pobs: self-check of the product-of-base multiplexer bank. Control words
// come from the coefficient table for random coefficients (the only words
// the filter can hold), the POBG inputs are random; each output must be the
// input its term selects, or 0 when the term is disabled. It also checks the
// pruning: with 8-bit coefficients the third term never selects 9x, and a
// word asking for it must give 0.
module tb_pobs;
  import fir_pkg::*;
  int checks = 0, failures = 0;
  logic [15:0]       px  [3];
  logic [15:0]       sel [3];
  logic signed [8:0] c;
  dbns_word_t        lut_w, w;
  int                used [3][3];

  edbns_lut #(.N(8)) u_lut (.c(c), .word(lut_w));
  pobs #(.N(8)) dut (.px(px), .word(w), .sel(sel));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3; t++) for (int j = 0; j < 3; j++) used[t][j] = 0;
    for (int n = 0; n < 3000; n++) begin
      for (int j = 0; j < 3; j++) px[j] = 16'($urandom);
      c = (n < 512) ? 9'(n) : 9'($urandom);
      #1;
      w = lut_w;
      #1;
      for (int t = 0; t < 3; t++) begin
        logic [15:0] want;
        want = w[t].en ? px[w[t].pow3] : 16'h0;
        if (w[t].en) used[t][w[t].pow3]++;
        checks++;
        if (sel[t] != want) begin
          failures++;
          $display("c=%0d term %0d: sel=%h want %h", c, t, sel[t], want);
        end
      end
    end
    // A word the table never produces: third term on 9x.
    w = '0;
    w[2].en = 1'b1;
    w[2].pow3 = 2'd2;
    px[2] = 16'h1234;
    #1;
    checks++;
    if (sel[2] != 16'h0) begin
      failures++;
      $display("pruned input 9x still reaches the third multiplexer");
    end
    checks++;
    if (used[2][2] != 0 || used[0][2] == 0 || used[1][2] == 0) begin
      failures++;
      $display("unexpected use of 9x by term: %0d %0d %0d", used[0][2], used[1][2], used[2][2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
