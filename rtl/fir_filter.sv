// fir_filter: reconfigurable 4-tap FIR filter with radix-8 Booth multipliers
// (top level).
//
//   y[n] = b0*x[n] + b1*x[n-1] + b2*x[n-2] + b3*x[n-3]
//
// The filter is in transposed form: every tap multiplies the current sample
// x[n] by its coefficient, and the products are summed along a chain of
// registers (z^-1) and adders that runs from b3 towards the output, so the
// critical path is one multiplier and one adder whatever the number of taps.
// The sample x[n] is the Booth-encoded multiplier of every tap (all taps
// encode the same sample, so synthesis can share the encoders). The
// coefficients are the multiplicands: each is stored with its precomputed 3b
// in coef_bank, so no tap has to form 3b on the fly. Each tap's multiplier
// (booth_r8_multiplier) is a Booth encoder, three Booth selectors, a
// carry-save layer and a carry look-ahead adder. The transposed structure,
// the tap count, the 8-bit width and the radix-8 Booth multiplier follow the
// design; the write port, the valid handshake and the widths of the
// accumulation chain are this design's choices.
//
// The coefficient multipliers can instead be built as double-base
// shift-and-add multipliers (ARCH = MULT_EDBNS): one product-of-base generator
// (pobg) forms x, 3x and 9x for all taps, and per tap a multiplexer bank (pobs)
// and a shift-and-add block (dbcg) form the product from the control word that
// edbns_coef_store looked up when the coefficient was written. Timing and
// interface are the same in both cases.
//
// Interface
//   s_u            1 = samples and coefficients are two's complement,
//                  0 = unsigned. Change it only together with a reload of
//                  the coefficients (3b is formed at write time).
//   coef_we/addr/data  write coefficient b[addr]; effective from the next cycle.
//   x_valid, x_in  one new sample per cycle when x_valid = 1; the chain holds
//                  its state while x_valid = 0.
//   y_valid, y_out y_out = y[n] for the sample accepted at the previous clock
//                  edge (latency one cycle, throughput one sample per cycle).
//                  ACC_W = 2*N + log2(NTAP) bits, exact for either signedness.
// Reset: asynchronous, active low; clears coefficients, delay chain and output.
module fir_filter
  import fir_pkg::*;
#(
  parameter int unsigned N     = DATA_W,
  parameter int unsigned NTAP  = TAPS,
  parameter int unsigned ACC_W = 2 * N + $clog2(NTAP),
  parameter mult_arch_e  ARCH  = MULT_BOOTH_R8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    s_u,
  input  logic                    coef_we,
  input  logic [$clog2(NTAP)-1:0] coef_addr,
  input  logic [N-1:0]            coef_data,
  input  logic                    x_valid,
  input  logic [N-1:0]            x_in,
  output logic                    y_valid,
  output logic signed [ACC_W-1:0] y_out
);

  logic [2*N-1:0]          prod     [NTAP];
  logic signed [ACC_W-1:0] prod_ext [NTAP];
  // z[k] holds the partial sum entering the adder of tap k-1 (z[0] unused).
  logic signed [ACC_W-1:0] z [NTAP];

  if (ARCH == MULT_BOOTH_R8) begin : g_booth
    logic signed [N:0]   coef   [NTAP];
    logic signed [N+2:0] coef3  [NTAP];

    coef_bank #(.N(N), .NTAP(NTAP)) u_coefs (
      .clk  (clk),
      .rst_n(rst_n),
      .s_u  (s_u),
      .we   (coef_we),
      .addr (coef_addr),
      .wdata(coef_data),
      .coef (coef),
      .coef3(coef3)
    );

    for (genvar k = 0; k < NTAP; k++) begin : g_tap
      booth_r8_multiplier #(.N(N)) u_mult (
        .s_u(s_u),
        .b  (x_in),
        .a  (coef[k]),
        .a3 (coef3[k]),
        .p  (prod[k])
      );
    end
  end else begin : g_edbns
    dbns_word_t        words [NTAP];
    logic signed [N:0] x_ext;
    logic [2*N-1:0]    px    [DBNS_POW3];

    assign x_ext = signed'({s_u & x_in[N-1], x_in});

    edbns_coef_store #(.N(N), .NTAP(NTAP)) u_coefs (
      .clk  (clk),
      .rst_n(rst_n),
      .s_u  (s_u),
      .we   (coef_we),
      .addr (coef_addr),
      .wdata(coef_data),
      .words(words)
    );

    pobg #(.N(N)) u_pobg (
      .x (x_ext),
      .px(px)
    );

    for (genvar k = 0; k < NTAP; k++) begin : g_tap
      logic [2*N-1:0] sel [DBNS_TERMS];

      pobs #(.N(N)) u_pobs (
        .px  (px),
        .word(words[k]),
        .sel (sel)
      );

      dbcg #(.N(N)) u_dbcg (
        .sel (sel),
        .word(words[k]),
        .p   (prod[k])
      );
    end
  end

  for (genvar k = 0; k < NTAP; k++) begin : g_ext
    assign prod_ext[k] = s_u ? ACC_W'(signed'(prod[k])) : ACC_W'(prod[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NTAP); k++) z[k] <= '0;
      y_out   <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) begin
        for (int k = 1; k < int'(NTAP) - 1; k++) z[k] <= prod_ext[k] + z[k+1];
        z[NTAP-1] <= prod_ext[NTAP-1];
        y_out     <= prod_ext[0] + z[1];
      end
    end
  end

endmodule
