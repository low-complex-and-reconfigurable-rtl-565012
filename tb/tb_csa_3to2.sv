// tb_csa_3to2: self-check of the carry-save layer with random and corner
// operands: sum + carry must equal x + y + z (mod 2^16), and each sum bit
// must be the parity of the three input bits.
module tb_csa_3to2;
  int checks = 0, failures = 0;
  logic [15:0] x, y, z, s, c;

  csa_3to2 #(.WIDTH(16)) dut (.x(x), .y(y), .z(z), .sum(s), .carry(c));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      if (t < 8) begin
        x = t[0] ? 16'hFFFF : 16'h0000;
        y = t[1] ? 16'hFFFF : 16'h0000;
        z = t[2] ? 16'hFFFF : 16'h0000;
      end else begin
        x = 16'($urandom);
        y = 16'($urandom);
        z = 16'($urandom);
      end
      #1;
      checks++;
      if (16'(s + c) != 16'(x + y + z)) begin
        failures++;
        $display("x=%h y=%h z=%h: sum=%h carry=%h", x, y, z, s, c);
      end
      checks++;
      if (s != (x ^ y ^ z) || c[0] !== 1'b0) begin
        failures++;
        $display("x=%h y=%h z=%h: bad sum row %h / carry lsb", x, y, z, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
