// tb_triple_gen: exhaustive self-check of the 3A generator over every 9-bit
// two's complement input.
module tb_triple_gen;
  int checks = 0, failures = 0;
  logic signed [8:0]  a;
  logic signed [10:0] a3;

  triple_gen #(.AW(9)) dut (.a(a), .a3(a3));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -256; v < 256; v++) begin
      a = 9'(v);
      #1;
      checks++;
      if (int'(a3) != 3 * v) begin
        failures++;
        $display("a=%0d: a3=%0d want %0d", v, a3, 3 * v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
