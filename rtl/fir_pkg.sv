// fir_pkg: constants, types and elaboration-time helper functions shared by the
// shift-and-add FIR filter (fir_opt_top), its multiple-constant multiplier
// (mcm_block) and their testbenches.
//
// Coefficients are carried as a fixed-size vector of unsigned integers
// (cvec_t, up to MAX_C entries); a separate count says how many are used.
// The helper functions are evaluated while the design elaborates, never in
// hardware: they find the distinct coefficients (so that a product is built
// once and reused by every tap with that coefficient), split a constant into
// octal digits for the shift-and-add multiplier, and size the registers of
// the transposed-form chain.
//
// Default coefficients (FIR_COEF): an 18-tap (order 17) equiripple low-pass,
// passband edge 0.365 and stopband edge 0.475 of the sampling rate, stopband
// weight 2, scaled by 1000, rounded, and made positive by taking the absolute
// value. The signed values before the absolute value are
//   0 16 -25 34 -34 16 34 -149 614 614 -149 34 16 -34 34 -25 16 0.
// The order, the design method, the x1000 scaling and the absolute value
// follow the filter this design implements. The original band edges are not
// known; these were chosen because they give what that filter is described
// as having: 18 coefficients with only five distinct non-zero values
// (16, 25, 34, 149, 614), 34 occurring three times and 16 twice in each half,
// so only five constant products are needed. Note that taking the absolute
// value changes the frequency response of a filter with negative taps; the
// hardware implements the positive set as given.
package fir_pkg;

  localparam int unsigned COEF_W = 16;   // bits of one coefficient
  localparam int unsigned MAX_C  = 32;   // capacity of a coefficient vector

  typedef logic [COEF_W-1:0] coef_t;
  typedef coef_t [MAX_C-1:0] cvec_t;

  localparam int unsigned FIR_TAPS = 18;

  function automatic cvec_t make_fir_coef();
    cvec_t c;
    c = '0;
    c[0]  = 16'd0;   c[1]  = 16'd16;  c[2]  = 16'd25;  c[3]  = 16'd34;
    c[4]  = 16'd34;  c[5]  = 16'd16;  c[6]  = 16'd34;  c[7]  = 16'd149;
    c[8]  = 16'd614; c[9]  = 16'd614; c[10] = 16'd149; c[11] = 16'd34;
    c[12] = 16'd16;  c[13] = 16'd34;  c[14] = 16'd34;  c[15] = 16'd25;
    c[16] = 16'd16;  c[17] = 16'd0;
    return c;
  endfunction

  localparam cvec_t FIR_COEF = make_fir_coef();

  // The two constants of the partial-product sharing example: 29x and 43x.
  function automatic cvec_t make_example_coef();
    cvec_t c;
    c = '0;
    c[0] = 16'd29;
    c[1] = 16'd43;
    return c;
  endfunction

  localparam cvec_t EXAMPLE_COEF = make_example_coef();

  // Number of bits of an unsigned value v (at least 1).
  function automatic int unsigned ubits(int unsigned v);
    int unsigned b;
    b = 1;
    while (b < 32 && (v >> b) != 0) b++;
    return b;
  endfunction

  // Ceiling of log2(v), 0 for v <= 1.
  function automatic int unsigned clog2u(int unsigned v);
    int unsigned b;
    b = 0;
    while (b < 32 && (64'(1) << b) < 64'(v)) b++;
    return b;
  endfunction

  function automatic int unsigned max_coef(cvec_t c, int unsigned n);
    int unsigned m;
    m = 0;
    for (int unsigned i = 0; i < n; i++)
      if (32'(c[i]) > m) m = 32'(c[i]);
    return m;
  endfunction

  // Sum of c[lo] .. c[n-1].
  function automatic int unsigned sum_coef(cvec_t c, int unsigned lo, int unsigned n);
    int unsigned s;
    s = 0;
    for (int unsigned i = lo; i < n; i++) s += 32'(c[i]);
    return s;
  endfunction

  // Number of distinct non-zero values among c[0] .. c[n-1].
  function automatic int unsigned num_distinct(cvec_t c, int unsigned n);
    int unsigned cnt;
    bit seen;
    cnt = 0;
    for (int unsigned i = 0; i < n; i++) begin
      seen = (c[i] == '0);
      for (int unsigned j = 0; j < i; j++)
        if (c[j] == c[i]) seen = 1'b1;
      if (!seen) cnt++;
    end
    return cnt;
  endfunction

  // The distinct non-zero values, in order of first appearance.
  function automatic cvec_t distinct_set(cvec_t c, int unsigned n);
    cvec_t d;
    int unsigned cnt;
    bit seen;
    d = '0;
    cnt = 0;
    for (int unsigned i = 0; i < n; i++) begin
      seen = (c[i] == '0);
      for (int unsigned j = 0; j < i; j++)
        if (c[j] == c[i]) seen = 1'b1;
      if (!seen) begin
        d[cnt] = c[i];
        cnt++;
      end
    end
    return d;
  endfunction

  // Position of value v in d[0] .. d[n-1] (0 if absent).
  function automatic int unsigned index_of(cvec_t d, int unsigned n, coef_t v);
    int unsigned idx;
    idx = 0;
    for (int unsigned i = 0; i < n; i++)
      if (d[i] == v) idx = i;
    return idx;
  endfunction

  // Octal digit k (weight 8**k) of a constant.
  function automatic int unsigned octal_digit(coef_t v, int unsigned k);
    return int'((32'(v) >> (3 * k)) & 32'd7);
  endfunction

  // Does any of c[0] .. c[n-1] have the octal digit dig (or 2*dig)?
  function automatic bit uses_digit(cvec_t c, int unsigned n, int unsigned dig);
    bit u;
    u = 1'b0;
    for (int unsigned i = 0; i < n; i++)
      for (int unsigned k = 0; k < (COEF_W + 2) / 3; k++)
        if (octal_digit(c[i], k) == dig || octal_digit(c[i], k) == 2 * dig) u = 1'b1;
    return u;
  endfunction

endpackage
