// act_pkg: shared types, constants and the table generator of the LUT-based
// activation accelerator.
//
// The accelerator evaluates a univariate activation function on an 8-bit
// fixed-point value by using the 8 input bits directly as the address of a
// 256-entry table of 8-bit results. An 8-bit fixed-point number can put its
// binary point in 9 places (0 to 8 fractional bits), and each place needs its
// own table; a design instance builds only the one table selected by its
// FRAC_BITS parameter. The output uses the same fixed-point format as the
// input, rounded to the nearest output step (error at most 1/2 LSB) and
// saturated to the representable range.
//
// lut_entry() computes one table entry at elaboration time with exact integer
// arithmetic, so no data file is needed:
//   x      = k / 2^F            (k = the address read as a signed or unsigned byte)
//   e^-|x| = b^n, b = e^(-1/256) held in Q2.62, n = |k| * 2^(8-F)  (square and multiply)
//   s(|x|) = 1 / (1 + e^-|x|)   (one 128-bit division), s(x) = 1 - s(|x|) for x < 0
//   sigmoid entry = round(s(x) * 2^F),  SiLU entry = round(x * s(x) * 2^F) = round(k * s(x))
// Rounding is to nearest, ties towards +infinity. The two functions and the 9
// precisions follow the accelerator description; the rounding rule and the
// Q2.62 working precision are this design's choices.
package act_pkg;

  // Width of a data value and number of entries of one table.
  localparam int unsigned DATA_W    = 8;
  localparam int unsigned LUT_DEPTH = 1 << DATA_W;
  // Binary point positions an 8-bit value can take: 0..8 fractional bits.
  localparam int unsigned N_PRECISIONS = DATA_W + 1;

  // Functions whose samples can be placed in the tables.
  typedef enum logic [0:0] {
    ACT_SIGMOID = 1'b0,
    ACT_SILU    = 1'b1
  } act_func_e;

  // One data value and a vector of them (one beat of a stream).
  typedef logic [DATA_W-1:0] act_data_t;

  // Working precision of the table generator.
  localparam int unsigned Q = 62;
  localparam logic [127:0] ONE_Q      = 128'd1 << Q;
  localparam logic [127:0] HALF_Q     = 128'd1 << (Q - 1);
  // e^(-1/256) * 2^62, rounded down.
  localparam logic [127:0] EXP_STEP_Q = 128'd4593706758521714574;

  // Table entry at address `addr` for function `func`, `frac_bits` fractional
  // bits and signed (two's complement) or unsigned data.
  function automatic act_data_t lut_entry(act_func_e func, int unsigned frac_bits,
                                          bit is_signed, act_data_t addr);
    int                  k;        // x * 2^frac_bits
    int unsigned         n;        // |x| * 2^8
    logic        [127:0] r, p;     // square-and-multiply state, Q62
    logic        [127:0] sig_pos;  // sigmoid(|x|), Q62
    logic        [127:0] sig;      // sigmoid(x), Q62
    logic signed [127:0] v;        // result * 2^frac_bits, Q62
    logic signed [127:0] q;        // rounded result
    logic signed [127:0] lo, hi;   // representable range
    k  = is_signed ? int'($signed(addr)) : int'(addr);
    n  = (k < 0 ? -k : k) << (DATA_W - frac_bits);
    r  = ONE_Q;
    p  = EXP_STEP_Q;
    for (int i = 0; i < 16; i++) begin
      if (n[i]) r = (r * p) >> Q;
      p = (p * p) >> Q;
    end
    sig_pos = (ONE_Q << Q) / (ONE_Q + r);
    sig     = (k < 0) ? (ONE_Q - sig_pos) : sig_pos;
    if (func == ACT_SIGMOID) v = $signed(sig << frac_bits);
    else                     v = $signed(128'(k)) * $signed(sig);
    q  = (v + $signed(HALF_Q)) >>> Q;
    lo = is_signed ? -128 : 0;
    hi = is_signed ? 127 : 255;
    if (q < lo) q = lo;
    if (q > hi) q = hi;
    return q[DATA_W-1:0];
  endfunction

endpackage
