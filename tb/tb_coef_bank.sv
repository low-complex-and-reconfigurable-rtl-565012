// tb_coef_bank: self-check of the coefficient store: reset clears every
// entry, writes land only at their address one cycle later with the correct
// sign/zero extension and 3b, and entries hold while nothing is written.
module tb_coef_bank;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, s_u = 0, we = 0;
  logic [1:0] addr = 0;
  logic [7:0] wdata = 0;
  logic signed [8:0]  coef  [4];
  logic signed [10:0] coef3 [4];
  int model [4];

  coef_bank #(.N(8), .NTAP(4)) dut (.clk(clk), .rst_n(rst_n), .s_u(s_u), .we(we),
                                    .addr(addr), .wdata(wdata), .coef(coef), .coef3(coef3));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(input string what);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (int'(coef[k]) != model[k] || int'(coef3[k]) != 3 * model[k]) begin
        failures++;
        $display("%s: entry %0d = %0d/%0d want %0d/%0d", what, k, coef[k], coef3[k], model[k], 3 * model[k]);
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
