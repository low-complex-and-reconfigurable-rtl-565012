// tb_booth_r8_ppgen: exhaustive self-check of the Booth selector: every 9-bit
// multiplicand against every digit -4..+4 must give digit * a.
module tb_booth_r8_ppgen;
  import fir_pkg::*;
  int checks = 0, failures = 0;
  logic signed [8:0]  a;
  logic signed [10:0] a3;
  booth_digit_t       d;
  logic signed [11:0] pp;

  booth_r8_ppgen #(.AW(9)) dut (.a(a), .a3(a3), .d(d), .pp(pp));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -256; v < 256; v++) begin
      for (int dv = -4; dv <= 4; dv++) begin
        int mag;
        a  = 9'(v);
        a3 = 11'(3 * v);
        mag = dv < 0 ? -dv : dv;
        d = BOOTH_ZERO;
        d.neg   = dv < 0;
        d.one   = mag == 1;
        d.two   = mag == 2;
        d.three = mag == 3;
        d.four  = mag == 4;
        #1;
        checks++;
        if (int'(pp) != dv * v) begin
          failures++;
          $display("a=%0d digit=%0d: pp=%0d want %0d", v, dv, pp, dv * v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
