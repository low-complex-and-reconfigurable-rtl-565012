// tb_pobg: exhaustive self-check of the product-of-base generator: for every
// 9-bit sample the outputs must be x, 3x and 9x modulo 2^16.
module tb_pobg;
  import fir_pkg::*;
  int checks = 0, failures = 0;
  logic signed [8:0] x;
  logic [15:0]       px [3];

  pobg #(.N(8)) dut (.x(x), .px(px));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -256; v < 256; v++) begin
      x = 9'(v);
      #1;
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (px[j] != 16'(v * (3 ** j))) begin
          failures++;
          $display("x=%0d: px[%0d]=%0d want %0d", v, j, px[j], v * (3 ** j));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
