// tb_cla_adder: self-check of the carry look-ahead adder at 16 bits (whole
// groups) and 11 bits (a partial last group): random operands and carry-in
// plus long carry chains, against the built-in addition.
module tb_cla_adder;
  int checks = 0, failures = 0;
  logic [15:0] a16, b16, s16;
  logic [10:0] a11, b11, s11;
  logic        cin, co16, co11;

  cla_adder #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(cin), .sum(s16), .cout(co16));
  cla_adder #(.WIDTH(11)) dut11 (.a(a11), .b(b11), .cin(cin), .sum(s11), .cout(co11));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      if (t < 64) begin
        // carry chains: all-ones plus a single 1 at varying positions
        a16 = 16'hFFFF; b16 = 16'(1) << (t % 16); cin = t[4];
        a11 = 11'h7FF;  b11 = 11'(1) << (t % 11);
      end else begin
        a16 = 16'($urandom); b16 = 16'($urandom); cin = 1'($urandom);
        a11 = 11'($urandom); b11 = 11'($urandom);
      end
      #1;
      checks++;
      if ({co16, s16} != 17'(a16) + 17'(b16) + 17'(cin)) begin
        failures++;
        $display("16b: %h + %h + %b = %b_%h", a16, b16, cin, co16, s16);
      end
      checks++;
      if ({co11, s11} != 12'(a11) + 12'(b11) + 12'(cin)) begin
        failures++;
        $display("11b: %h + %h + %b = %b_%h", a11, b11, cin, co11, s11);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
