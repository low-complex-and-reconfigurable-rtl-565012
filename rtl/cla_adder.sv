// cla_adder: carry look-ahead adder used as the final carry-propagate adder.
//
// Bit generate g = a & b and propagate p = a ^ b are formed for every bit.
// The operand is split into 4-bit groups; inside a group every carry is the
// expanded sum of products of g and p (no rippling), and each group also
// forms a group generate and propagate. A second look-ahead level computes
// the carry into every group from the group signals, again without rippling.
// The use of a carry look-ahead adder for the last addition follows the
// multiplier description; the two-level 4-bit grouping is this design's
// choice.
//
// Purely combinational. sum = (a + b + cin) mod 2^WIDTH, cout is the carry out.
module cla_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned GW = 4;
  localparam int unsigned NG = (WIDTH + GW - 1) / GW;

  logic [NG*GW-1:0] g, p;
  logic [NG*GW:0]   c;
  logic [NG-1:0]    gg, gp;
  logic [NG:0]      gc;

  always_comb begin
    g = '0;
    p = '0;
    g[WIDTH-1:0] = a & b;
    p[WIDTH-1:0] = a ^ b;

    // Group generate / propagate.
    for (int unsigned k = 0; k < NG; k++) begin
      gp[k] = &p[k*GW +: GW];
      gg[k] = 1'b0;
      for (int unsigned j = 0; j < GW; j++) begin
        logic t;
        t = g[k*GW + j];
        for (int unsigned m = j + 1; m < GW; m++) t = t & p[k*GW + m];
        gg[k] = gg[k] | t;
      end
    end

    // Second level: carry into each group, as a flat sum of products.
    gc[0] = cin;
    for (int unsigned k = 1; k <= NG; k++) begin
      logic t;
      gc[k] = 1'b0;
      for (int unsigned j = 0; j < k; j++) begin
        t = gg[j];
        for (int unsigned m = j + 1; m < k; m++) t = t & gp[m];
        gc[k] = gc[k] | t;
      end
      t = cin;
      for (int unsigned m = 0; m < k; m++) t = t & gp[m];
      gc[k] = gc[k] | t;
    end

    // Carries inside each group from the group carry-in.
    for (int unsigned k = 0; k < NG; k++) begin
      for (int unsigned i = 0; i < GW; i++) begin
        logic acc, t;
        acc = 1'b0;
        for (int unsigned j = 0; j < i; j++) begin
          t = g[k*GW + j];
          for (int unsigned m = j + 1; m < i; m++) t = t & p[k*GW + m];
          acc = acc | t;
        end
        t = gc[k];
        for (int unsigned m = 0; m < i; m++) t = t & p[k*GW + m];
        c[k*GW + i] = acc | t;
      end
    end

    c[NG*GW] = gc[NG];

    sum  = p[WIDTH-1:0] ^ c[WIDTH-1:0];
    cout = c[WIDTH];
  end

endmodule
