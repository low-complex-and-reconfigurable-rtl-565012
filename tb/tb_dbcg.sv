// tb_dbcg: self-check of the double-base shift-and-add block with random
// selected multiples and control words: the output must be
// the sum over the terms of (+-1) * sel[t] * 2^shift[t], modulo 2^16.
module tb_dbcg;
  import fir_pkg::*;
  int checks = 0, failures = 0;
  logic [15:0] sel [3];
  logic [15:0] p;
  dbns_word_t  w;

  dbcg #(.N(8)) dut (.sel(sel), .word(w), .p(p));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      longint want;
      want = 0;
      for (int t = 0; t < 3; t++) begin
        sel[t]     = (n < 100) ? 16'(1 << ($urandom % 4)) : 16'($urandom);
        w[t].en    = 1'b1;
        w[t].neg   = 1'($urandom);
        w[t].pow3  = 2'($urandom % 3);
        w[t].shift = 4'($urandom);
        want += (w[t].neg ? -1 : 1) * (longint'(sel[t]) <<< w[t].shift);
      end
      #1;
      checks++;
      if (p != 16'(want)) begin
        failures++;
        $display("p=%h want %h", p, 16'(want));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
