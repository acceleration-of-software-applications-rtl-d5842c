// act_ref_pkg: floating-point reference of the activation functions, shared by
// the stream-level testbenches. It computes the exact function value with $exp
// and accepts an 8-bit result if it lies within 1/2 LSB of that value, or is
// the saturation value when the exact result is outside the 8-bit range.
package act_ref_pkg;
  import act_pkg::*;

  // Exact function value, in units of the output LSB.
  function automatic real act_ideal(act_func_e func, int frac, bit is_signed, act_data_t in);
    real x, s;
    int  k;
    k = is_signed ? int'($signed(in)) : int'(in);
    x = real'(k) / (2.0 ** frac);
    s = 1.0 / (1.0 + $exp(-x));
    return ((func == ACT_SIGMOID) ? s : x * s) * (2.0 ** frac);
  endfunction

  function automatic bit act_ok(act_func_e func, int frac, bit is_signed,
                                act_data_t in, act_data_t got);
    real ideal, lo, hi, g;
    ideal = act_ideal(func, frac, is_signed, in);
    lo    = is_signed ? -128.0 : 0.0;
    hi    = is_signed ? 127.0 : 255.0;
    g     = is_signed ? real'($signed(got)) : real'(got);
    if (ideal >= hi) return g == hi;
    if (ideal <= lo) return g == lo;
    return (g - ideal <= 0.5 + 1e-9) && (ideal - g <= 0.5 + 1e-9);
  endfunction
endpackage
