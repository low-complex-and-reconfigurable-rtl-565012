// csa_3to2: one layer of carry-save addition (a row of full adders used as
// 3:2 compressors).
//
// Every bit position is a full adder: sum = x ^ y ^ z, carry = majority(x,y,z).
// The carries are returned already shifted one place left, so
// x + y + z == sum + carry (mod 2^WIDTH). With the three partial products of
// an 8-bit radix-8 Booth multiplication a single layer reduces them to two
// rows, which is the whole Wallace tree for that case.
//
// Purely combinational.
module csa_3to2 #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] z,
  output logic [WIDTH-1:0] sum,
  output logic [WIDTH-1:0] carry
);

  logic [WIDTH-1:0] maj;

  always_comb begin
    sum   = x ^ y ^ z;
    maj   = (x & y) | (x & z) | (y & z);
    carry = {maj[WIDTH-2:0], 1'b0};
  end

endmodule
