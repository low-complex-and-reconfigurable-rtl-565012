// tb_booth_r8_encoder: exhaustive self-check of the radix-8 Booth encoder.
// For every 8-bit multiplier in both signed and unsigned mode it checks that
// each digit is well formed (at most one magnitude bit, no negative zero),
// that sum(digit[i] * 8^i) equals the operand's value, and that every digit
// equals -4*q3 + 2*q2 + q1 + q0 of its quartet, formed here independently.
module tb_booth_r8_encoder;
  import fir_pkg::*;

  int checks = 0, failures = 0;
  logic         s_u;
  logic [7:0]   y;
  booth_digit_t digits [3];

  booth_r8_encoder #(.N(8), .ND(3)) dut (.s_u(s_u), .y(y), .digits(digits));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int v = 0; v < 256; v++) begin
        int expect_val, sum, qv;
        logic [9:0] e;
        s_u = m[0];
        y   = v[7:0];
        #1;
        expect_val = (m == 1 && v >= 128) ? v - 256 : v;
        e = {s_u & y[7], y, 1'b0};
        sum = 0;
        for (int i = 0; i < 3; i++) begin
          logic [3:0] q;
          q = e[3*i +: 4];
          qv = -4 * int'(q[3]) + 2 * int'(q[2]) + int'(q[1]) + int'(q[0]);
          checks++;
          if ($countones({digits[i].one, digits[i].two, digits[i].three, digits[i].four}) > 1 ||
              (digits[i].neg && booth_digit_value(digits[i]) == 0)) begin
            failures++;
            $display("malformed digit %0d for y=%0d s_u=%0d", i, v, m);
          end
          checks++;
          if (booth_digit_value(digits[i]) != qv) begin
            failures++;
            $display("digit %0d of y=%0d s_u=%0d: got %0d want %0d", i, v, m,
                     booth_digit_value(digits[i]), qv);
          end
          sum += booth_digit_value(digits[i]) * (8 ** i);
        end
        checks++;
        if (sum != expect_val) begin
          failures++;
          $display("y=%0d s_u=%0d: digits sum to %0d, want %0d", v, m, sum, expect_val);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
