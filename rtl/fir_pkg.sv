// fir_pkg: types and default sizes shared by the reconfigurable FIR filter
// and its radix-8 Booth multiplier.
//
// A radix-8 Booth digit takes one of the nine values -4..+4. It is carried
// between the encoder and the partial product generator as a sign bit plus a
// one-hot selection of the magnitude (1, 2, 3 or 4 times the multiplicand);
// the digit 0 has every selection bit low and its sign bit low. The 8-bit data
// and coefficient width and the four taps follow the filter the design is
// built for; the widths derived from them are this design's choice.
package fir_pkg;

  // Sample and coefficient width.
  localparam int unsigned DATA_W = 8;
  // Number of filter taps (b0..b3).
  localparam int unsigned TAPS = 4;

  // One recoded radix-8 Booth digit.
  typedef struct packed {
    logic neg;    // digit is negative
    logic one;    // |digit| == 1
    logic two;    // |digit| == 2
    logic three;  // |digit| == 3 (uses the precomputed 3A)
    logic four;   // |digit| == 4
  } booth_digit_t;

  localparam booth_digit_t BOOTH_ZERO = '{neg: 1'b0, one: 1'b0, two: 1'b0, three: 1'b0, four: 1'b0};

  // Which coefficient multiplier the filter taps use.
  typedef enum logic {
    MULT_BOOTH_R8 = 1'b0,  // radix-8 modified Booth multipliers (default)
    MULT_EDBNS    = 1'b1   // double-base (2 and 3) shift-and-add constant multipliers
  } mult_arch_e;

  // Double-base coefficient representation: c = sum over terms of
  // (+-1) * 2^shift * 3^pow3, with pow3 in 0..DBNS_POW3-1 and at most
  // DBNS_TERMS terms. Three terms with powers of three 1, 3 and 9 cover
  // every 8-bit coefficient, signed or unsigned.
  localparam int unsigned DBNS_POW3    = 3;
  localparam int unsigned DBNS_TERMS   = 3;
  localparam int unsigned DBNS_SHIFT_W = 4;

  typedef struct packed {
    logic                    en;     // term present
    logic                    neg;    // term is subtracted
    logic [1:0]              pow3;   // which POBG output, x * 3^pow3
    logic [DBNS_SHIFT_W-1:0] shift;  // power of two
  } dbns_term_t;

  typedef dbns_term_t [DBNS_TERMS-1:0] dbns_word_t;

  // Greedy double-base encoding of one coefficient value: repeatedly take the
  // term 2^i * 3^j nearest the remainder (the smaller one on a tie) and
  // subtract it with the remainder's sign. Used to fill the coefficient LUT
  // and to find which multiplexer inputs can ever be selected.
  function automatic dbns_word_t dbns_encode(input int value);
    dbns_word_t w;
    int r;
    w = '0;
    r = value;
    for (int t = 0; t < int'(DBNS_TERMS); t++) begin
      if (r != 0) begin
        int best_v, best_d, best_i, best_j, mag;
        mag    = r < 0 ? -r : r;
        best_v = 0;
        best_d = mag + 1;
        best_i = 0;
        best_j = 0;
        for (int i = 0; i < 2 ** DBNS_SHIFT_W; i++) begin
          for (int j = 0; j < int'(DBNS_POW3); j++) begin
            int v, d;
            v = (2 ** i) * (3 ** j);
            d = v > mag ? v - mag : mag - v;
            if (d < best_d || (d == best_d && v < best_v)) begin
              best_v = v;
              best_d = d;
              best_i = i;
              best_j = j;
            end
          end
        end
        w[t].en    = 1'b1;
        w[t].neg   = r < 0;
        w[t].pow3  = 2'(best_j);
        w[t].shift = DBNS_SHIFT_W'(best_i);
        r = r < 0 ? r + best_v : r - best_v;
      end
    end
    return w;
  endfunction

  // Multiplexer input pruning: bit t*DBNS_POW3 + j is set when some
  // (n+1)-bit coefficient uses x * 3^j in term t. Inputs never used need not
  // be wired to that multiplexer.
  function automatic logic [DBNS_TERMS*DBNS_POW3-1:0] dbns_inputs_used(input int unsigned n);
    logic [DBNS_TERMS*DBNS_POW3-1:0] used;
    dbns_word_t w;
    used = '0;
    for (int c = -(2 ** n); c < 2 ** n; c++) begin
      w = dbns_encode(c);
      for (int t = 0; t < int'(DBNS_TERMS); t++)
        if (w[t].en) used[t * int'(DBNS_POW3) + int'(w[t].pow3)] = 1'b1;
    end
    return used;
  endfunction

  // Number of radix-8 digits needed for an N-bit multiplier: the operand is
  // extended by one bit (sign or zero) and a 0 is appended below the LSB, so
  // ceil((N+1)/3) overlapping quartets cover it.
  function automatic int unsigned booth_r8_digits(input int unsigned n);
    return (n + 1 + 2) / 3;
  endfunction

  // Value of a digit as a small signed integer (used by checks and tests).
  function automatic int booth_digit_value(input booth_digit_t d);
    int mag;
    mag = d.one ? 1 : d.two ? 2 : d.three ? 3 : d.four ? 4 : 0;
    return d.neg ? -mag : mag;
  endfunction

endpackage
