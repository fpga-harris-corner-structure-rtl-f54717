// fp_ref_pkg: conversions between the 27-bit float format and real numbers,
// for the floating-point testbenches. A 27-bit float is
// (-1)^s * 2^(e-127) * (1 + f/2^18), e = 0 meaning zero.
package fp_ref_pkg;
  function automatic real pow2(int e);
    real r = 1.0;
    if (e >= 0) for (int k = 0; k < e; k++) r = r * 2.0;
    else for (int k = 0; k < -e; k++) r = r / 2.0;
    return r;
  endfunction

  function automatic real to_real(logic [26:0] v);
    real m;
    if (v[25:18] == 0) return 0.0;
    m = (1.0 + real'(v[17:0]) / 262144.0) * pow2(int'(v[25:18]) - 127);
    return v[26] ? -m : m;
  endfunction

  function automatic logic [26:0] rand_fp(int emin, int emax);
    logic [26:0] v;
    v[26] = 1'($urandom);
    v[25:18] = 8'($urandom_range(emin, emax));
    v[17:0] = 18'($urandom);
    return v;
  endfunction

  function automatic real fabs(real x);
    return x < 0.0 ? -x : x;
  endfunction
endpackage
