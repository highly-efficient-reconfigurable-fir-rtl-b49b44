// rfir_pkg: types and constants shared by the reconfigurable block FIR filter.
//
// The default sizes are the filter's main configuration: block size L = 4 and
// filter length N = 64, giving M = N/L = 16 inner-product units. Word lengths
// and the number of stored channel filters are this design's own choice:
// 8-bit signed samples and coefficients, four channel filters, and outputs kept
// at full precision (DATA_W + COEF_W + clog2(N) bits), so nothing is rounded.
package rfir_pkg;

  localparam int unsigned DEF_L      = 4;
  localparam int unsigned DEF_N      = 64;
  localparam int unsigned DEF_DATA_W = 8;
  localparam int unsigned DEF_COEF_W = 8;
  localparam int unsigned DEF_NUM_CH = 4;

  // Number of radix-4 Booth digits for a w-bit multiplier (odd w is
  // sign-extended by one bit).
  function automatic int unsigned booth_digits(int unsigned w);
    return (w + 1) / 2;
  endfunction

  // One recoded radix-4 Booth digit, as the "encoded signals" that pass from the
  // Booth encoder to the Booth decoder. Value = (neg ? -1 : +1) * (one ? 1 : two ? 2 : 0).
  typedef struct packed {
    logic neg;  // digit is negative
    logic two;  // magnitude 2
    logic one;  // magnitude 1
  } booth_dig_t;

  // Rows left after one Wallace layer: every full group of three rows becomes
  // a sum and a carry row, the one or two rows left over pass unchanged.
  function automatic int unsigned wallace_next(int unsigned n);
    return (n / 3) * 2 + (n % 3);
  endfunction

  // Rows entering Wallace layer `lv` when the tree starts with n rows.
  function automatic int unsigned wallace_rows_at(int unsigned n, int unsigned lv);
    int unsigned r = n;
    for (int unsigned i = 0; i < lv; i++) r = wallace_next(r);
    return r;
  endfunction

  // Number of layers needed to get from n rows down to two.
  function automatic int unsigned wallace_levels(int unsigned n);
    int unsigned r = n;
    int unsigned l = 0;
    while (r > 2) begin
      r = wallace_next(r);
      l++;
    end
    return l;
  endfunction

endpackage
