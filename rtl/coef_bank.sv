// coef_bank: programmable coefficient store of the reconfigurable FIR filter.
//
// Holds one entry per tap. An entry keeps the coefficient b, widened by one
// bit (its sign when s_u = 1, a zero when s_u = 0), together with 3b. Since
// the coefficients are the multiplicands of the Booth multipliers and are
// known before any sample arrives, the one hard radix-8 multiple 3b is
// computed by a single shared 2b + b adder (triple_gen) when the coefficient
// is written, instead of on every multiplication. Storing the multiplicand
// with its odd multiple follows the design idea; the write port and reset are
// this design's choice.
//
// Timing: a write (we = 1) takes effect at the rising clock edge; the new
// entry is visible on coef/coef3 in the next cycle. All entries are read in
// parallel every cycle. An asynchronous active-low
// reset clears every entry to 0. s_u must hold the signedness the filter will
// run with when a coefficient is written.
module coef_bank
  import fir_pkg::*;
#(
  parameter int unsigned N    = DATA_W,
  parameter int unsigned NTAP = TAPS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    s_u,
  input  logic                    we,
  input  logic [$clog2(NTAP)-1:0] addr,
  input  logic [N-1:0]            wdata,
  output logic signed [N:0]       coef  [NTAP],
  output logic signed [N+2:0]     coef3 [NTAP]
);

  logic signed [N:0]   w_ext;
  logic signed [N+2:0] w_ext3;

  assign w_ext = signed'({s_u & wdata[N-1], wdata});

  triple_gen #(.AW(N + 1)) u_triple (
    .a (w_ext),
    .a3(w_ext3)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NTAP); i++) begin
        coef[i]  <= '0;
        coef3[i] <= '0;
      end
    end else if (we) begin
      coef[addr]  <= w_ext;
      coef3[addr] <= w_ext3;
    end
  end

endmodule
