// tb_edbns_coef_store: self-check of the double-base coefficient store.
// After reset every word must mean 0; each write must land only at its
// address one cycle later, and the stored word, decoded here as
// sum (+-1) * 2^shift * 3^pow3, must equal the written coefficient with the
// extension s_u asked for.
module tb_edbns_coef_store;
  import fir_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, s_u = 0, we = 0;
  logic [1:0] addr = 0;
  logic [7:0] wdata = 0;
  dbns_word_t words [4];
  int model [4];

  edbns_coef_store #(.N(8), .NTAP(4)) dut (.clk(clk), .rst_n(rst_n), .s_u(s_u), .we(we),
                                           .addr(addr), .wdata(wdata), .words(words));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int decode(input dbns_word_t w);
    int s = 0;
    for (int t = 0; t < 3; t++)
      if (w[t].en) s += (w[t].neg ? -1 : 1) * (2 ** int'(w[t].shift)) * (3 ** int'(w[t].pow3));
    return s;
  endfunction

  task automatic check_all(input string what);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (decode(words[k]) != model[k]) begin
        failures++;
        $display("%s: entry %0d decodes to %0d want %0d", what, k, decode(words[k]), model[k]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) model[k] = 0;
    repeat (2) @(posedge clk);
    #1 check_all("reset");
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      we    = 1'($urandom);
      addr  = 2'($urandom);
      wdata = 8'($urandom);
      s_u   = 1'($urandom);
      @(posedge clk);
      if (we) model[addr] = (s_u && wdata[7]) ? int'(wdata) - 256 : int'(wdata);
      #1 check_all("after write");
    end
    @(negedge clk);
    we = 0;
    rst_n = 0;
    #1;
    for (int k = 0; k < 4; k++) model[k] = 0;
    check_all("async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
