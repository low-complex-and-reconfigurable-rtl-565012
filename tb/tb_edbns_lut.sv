// tb_edbns_lut: exhaustive self-check of the double-base coefficient table.
// For every 9-bit coefficient it rebuilds sum (+-1) * 2^shift * 3^pow3 from
// the returned word and compares it with the coefficient; it also checks that
// disabled terms are all-zero, that pow3 stays within x/3x/9x, and that
// enabled terms come first (term t+1 is never used when term t is not).
module tb_edbns_lut;
  import fir_pkg::*;
  int checks = 0, failures = 0;
  logic signed [8:0] c;
  dbns_word_t        w;

  edbns_lut #(.N(8)) dut (.c(c), .word(w));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -256; v < 256; v++) begin
      int sum;
      c = 9'(v);
      #1;
      sum = 0;
      for (int t = 0; t < 3; t++) begin
        int term;
        term = (2 ** int'(w[t].shift)) * (3 ** int'(w[t].pow3));
        if (w[t].en) sum += w[t].neg ? -term : term;
        checks++;
        if ((!w[t].en && w[t] != '0) || (w[t].en && w[t].pow3 > 2) ||
            (t > 0 && w[t].en && !w[t-1].en)) begin
          failures++;
          $display("c=%0d: malformed term %0d (%b)", v, t, w[t]);
        end
      end
      checks++;
      if (sum != v) begin
        failures++;
        $display("c=%0d: word decodes to %0d", v, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
