// moment_ref_pkg: reference model of the 18-bit floating-point arithmetic
// used by the testbenches, written without reference to the RTL.
//
// A floating-point value M * 2^(E-9) is held as the exact integer
// X = M * 2^E (the value times 2^9) in a 600-bit vector. Sums and products
// are formed exactly and then cut to their ten most significant bits
// (truncation), which is what aligning, adding and renormalising in the RTL
// amounts to. Powers are built from the same products as in the power unit.
package moment_ref_pkg;
  import moment_pkg::*;

  typedef logic [599:0] big_t;

  function automatic big_t to_big(fp_t f);
    return big_t'(f.m) << f.e;
  endfunction

  function automatic fp_t from_big(big_t v);
    int lead = -1;
    for (int k = 0; k < 600; k++) if (v[k]) lead = k;
    if (lead < 0) return FP_ZERO;
    if (lead - 9 > 255) return FP_MAX;
    return '{e: 8'(lead - 9), m: 10'(v >> (lead - 9))};
  endfunction

  function automatic fp_t ref_add(fp_t a, fp_t b);
    return from_big(to_big(a) + to_big(b));
  endfunction

  function automatic fp_t ref_mul(fp_t a, fp_t b);
    return from_big((to_big(a) * to_big(b)) >> 9);
  endfunction

  function automatic fp_t ref_int(int unsigned i);
    return from_big(big_t'(i) << 9);
  endfunction

  function automatic fp_t ref_pow(int unsigned x, int unsigned p);
    fp_t x1, x2, x3, x4;
    x1 = ref_int(x);
    x2 = ref_mul(x1, x1);
    x3 = ref_mul(x2, x1);
    x4 = ref_mul(x2, x2);
    case (p)
      0: return FP_ONE;
      1: return x1;
      2: return x2;
      3: return x3;
      4: return x4;
      5: return ref_mul(x4, x1);
      6: return ref_mul(x3, x3);
      default: return ref_mul(x4, x3);
    endcase
  endfunction

  // x^p * (y^q * f), the order of the two multipliers of a cell
  function automatic fp_t ref_term(int unsigned x, int unsigned y, int unsigned p,
                                   int unsigned q, int unsigned f);
    return ref_mul(ref_pow(x, p), ref_mul(ref_pow(y, q), ref_int(f)));
  endfunction

  function automatic real fp_to_real(fp_t f);
    return real'(f.m) * (2.0 ** (real'(f.e) - 9.0));
  endfunction

  function automatic real big_to_real(big_t v);
    real r = 0.0;
    for (int k = 599; k >= 0; k--) r = r * 2.0 + (v[k] ? 1.0 : 0.0);
    return r;
  endfunction

  // exact x^p * y^q * f
  function automatic big_t exact_term(int unsigned x, int unsigned y, int unsigned p,
                                      int unsigned q, int unsigned f);
    big_t v = big_t'(f);
    for (int k = 0; k < p; k++) v = v * big_t'(x);
    for (int k = 0; k < q; k++) v = v * big_t'(y);
    return v;
  endfunction

  // random normalised value with exponent up to emax (or zero, 1 in 16)
  function automatic fp_t rand_fp(int unsigned emax);
    fp_t f;
    if ($urandom_range(15) == 0) return FP_ZERO;
    f.e = 8'($urandom_range(emax));
    f.m = 10'($urandom_range(1023, 512));
    return f;
  endfunction
endpackage
