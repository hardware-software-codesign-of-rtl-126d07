// dpd_ref_pkg: reference arithmetic for the testbenches.
//
// An independent, integer-only statement of the predistorter's number
// formats: floor square root of I^2+Q^2, powers |x|^p truncated to 15
// fraction bits and POW_W bits, basis values x|x|^p truncated to BASIS_W
// bits, products summed exactly, then rounded half up to 15 fraction bits
// and saturated to 16 bits. Also a simple amplifier model used as the
// device under linearisation in the end-to-end test.
package dpd_ref_pkg;
  import dpd_pkg::*;

  function automatic longint isqrt_ref(longint v);
    longint lo = 0, hi = 65536;
    while (hi - lo > 1) begin
      longint mid = (lo + hi) / 2;
      if (mid * mid <= v) lo = mid; else hi = mid;
    end
    return lo;
  endfunction

  function automatic longint wrap_s(longint v, int w);   // keep w LSBs, as signed
    longint m = longint'(1) << w;
    v = v & (m - 1);
    if (v >= m / 2) v -= m;
    return v;
  endfunction

  function automatic longint sat16(longint r);
    return (r > 32767) ? 32767 : (r < -32768) ? -32768 : r;
  endfunction

  // basis values of one sample: re/im of x|x|^p, p = 0..P (P <= 7)
  typedef longint basis_vec_t [8];

  function automatic void basis_ref(input iq_t x, input int P, output basis_vec_t br, output basis_vec_t bi);
    longint i = longint'($signed(x.i)), q = longint'($signed(x.q));
    longint mag = isqrt_ref(i * i + q * q);
    longint pw = 32768;
    for (int p = 0; p <= P; p++) begin
      if (p == 1) pw = mag;
      else if (p > 1) pw = ((pw * mag) >> 15) & ((longint'(1) << POW_W) - 1);
      br[p] = wrap_s((i * pw) >>> 15, BASIS_W);
      bi[p] = wrap_s((q * pw) >>> 15, BASIS_W);
    end
  endfunction

  // memoryless compressive amplifier with a little AM/PM
  function automatic iq_t pa_model(iq_t x);
    longint i = longint'($signed(x.i)), q = longint'($signed(x.q));
    longint g = (i * i + q * q) >> 15;          // |x|^2 in Q?.15, below 2^16
    iq_t y;
    y.i = 16'(sat16(i - ((i * g) >>> 17) - ((q * g) >>> 20)));
    y.q = 16'(sat16(q - ((q * g) >>> 17) + ((i * g) >>> 20)));
    return y;
  endfunction

endpackage
