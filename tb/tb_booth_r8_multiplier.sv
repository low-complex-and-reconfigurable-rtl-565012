// tb_booth_r8_multiplier: exhaustive self-check of the 8x8 radix-8 Booth
// multiplier: all 65,536 operand pairs, signed and unsigned. The multiplicand
// is extended and its 3A formed here, as the coefficient store would.
module tb_booth_r8_multiplier;
  int checks = 0, failures = 0;
  logic               s_u;
  logic [7:0]         b;
  logic signed [8:0]  a;
  logic signed [10:0] a3;
  logic [15:0]        p;

  booth_r8_multiplier #(.N(8)) dut (.s_u(s_u), .b(b), .a(a), .a3(a3), .p(p));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          int av, bv;
          av = (m == 1 && i >= 128) ? i - 256 : i;
          bv = (m == 1 && j >= 128) ? j - 256 : j;
          s_u = m[0];
          a  = 9'(av);
          a3 = 11'(3 * av);
          b  = j[7:0];
          #1;
          checks++;
          if (p != 16'(av * bv)) begin
            failures++;
            if (failures < 10) $display("s_u=%0d %0d * %0d: got %h want %h", m, av, bv, p, 16'(av * bv));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
