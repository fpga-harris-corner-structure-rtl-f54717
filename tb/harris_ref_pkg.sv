// harris_ref_pkg: bit-accurate software reference of the detector's
// arithmetic for the testbenches. Values are Q6.21 in 27 bits held in
// longint; products keep bits [47:21] of the exact product, sums wrap at
// 27 bits. Kernel taps are built here from the three Gaussian samples
// exp(0), exp(-1/2), exp(-1) in Q6.21 (2097152, 1271986, 771500), not taken
// from the design package.
package harris_ref_pkg;
  function automatic longint wrap27(longint v);
    longint m = v & ((64'sd1 <<< 27) - 1);
    if (m >= (64'sd1 <<< 26)) m -= (64'sd1 <<< 27);
    return m;
  endfunction

  function automatic longint fxm(longint a, longint b);
    return wrap27((a * b) >>> 21);
  endfunction

  function automatic longint q(real v);
    return longint'($floor(v * 2097152.0 + 0.5));
  endfunction

  // kind 0: Gx = x*g, 1: Gy = y*g, 2: W = g
  function automatic longint kern_tap(int kind, int n);
    int y = n / 3 - 1;
    int x = n % 3 - 1;
    int d2 = x * x + y * y;
    longint g = (d2 == 0) ? 64'sd2097152 : (d2 == 1) ? 64'sd1271986 : 64'sd771500;
    case (kind)
      0: return x * g;
      1: return y * g;
      default: return g;
    endcase
  endfunction

  function automatic longint conv(int kind, longint w [9]);
    longint r [3];
    for (int i = 0; i < 3; i++)
      r[i] = wrap27(fxm(kern_tap(kind, 3*i), w[3*i]) + fxm(kern_tap(kind, 3*i+1), w[3*i+1])
                    + fxm(kern_tap(kind, 3*i+2), w[3*i+2]));
    return wrap27(r[0] + r[1] + r[2]);
  endfunction

  function automatic longint response(longint sxx, longint syy, longint sxy);
    longint k = q(0.04);
    longint tr = wrap27(sxx + syy) >>> 2;
    longint det = wrap27(fxm(sxx >>> 2, syy >>> 2) - fxm(sxy >>> 2, sxy >>> 2));
    return wrap27(det - fxm(k, fxm(tr, tr)));
  endfunction
endpackage
