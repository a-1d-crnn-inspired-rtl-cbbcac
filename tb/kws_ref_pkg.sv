// kws_ref_pkg: reference arithmetic used by the testbenches. Everything here
// is written from the arithmetic definitions (Booth digits as integers, the
// breaking-line rules as bit masks on integer partial products, plain integer
// formulas for the activations), not from the RTL structure.
package kws_ref_pkg;

  // Booth digit j (0..3) of an 8-bit multiplier b, from its integer value.
  function automatic int booth_digit(int b, int j);
    int bits, hi, mid, lo;
    bits = b & 8'hFF;
    hi  = (bits >> (2*j + 1)) & 1;
    mid = (bits >> (2*j)) & 1;
    lo  = (j == 0) ? 0 : ((bits >> (2*j - 1)) & 1);
    return -2 * hi + mid + lo;
  endfunction

  // Approximate product: rows above HBL are OR-merged, columns right of VBL
  // are AND-merged, the rest is an exact sum without carries from the right.
  function automatic int ref_mult(int a, int b, int hbl, int vbl);
    int pp [4];
    int n, lo_mask, hi_sum, lo_and, upper;
    for (int j = 0; j < 4; j++)
      pp[j] = ((booth_digit(b, j) * a) * (1 << (2*j))) & 16'hFFFF;
    n       = (hbl > 4) ? 4 : hbl;
    lo_mask = (1 << vbl) - 1;
    upper   = 0;
    for (int j = 0; j < n; j++) upper |= pp[j];
    hi_sum = 0;
    lo_and = 16'hFFFF;
    if (n > 0) begin
      hi_sum = upper & ~lo_mask;
      lo_and = upper;
    end
    for (int j = n; j < 4; j++) begin
      hi_sum += pp[j] & ~lo_mask;
      lo_and &= pp[j];
    end
    hi_sum = (hi_sum | (lo_and & lo_mask)) & 16'hFFFF;
    return (hi_sum >= 32768) ? hi_sum - 65536 : hi_sum;
  endfunction

  function automatic int asr(int v, int s);
    return v >>> s;
  endfunction

  function automatic int sat(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int sat8(int v);
    return sat(v, -128, 127);
  endfunction

  function automatic int sat16(int v);
    return sat(v, -32768, 32767);
  endfunction

  function automatic int hsig(int z);
    return sat((z >>> 2) + 32, 0, 64);
  endfunction

  function automatic int htanh(int z);
    return sat(z, -64, 64);
  endfunction

  // LSTM cell: returns {c_new[15:0], h[7:0]} packed as c_new*256 + (h & 255)
  function automatic void lstm_cell(int af, int ai, int ag, int ao, int shift,
                                    int c_prev, output int c_new, output int h);
    int f, i, g, o;
    f = hsig(sat16(af >>> shift));
    i = hsig(sat16(ai >>> shift));
    g = htanh(sat16(ag >>> shift));
    o = hsig(sat16(ao >>> shift));
    c_new = sat16((f * c_prev + i * g) >>> 6);
    h     = sat8((o * htanh(c_new)) >>> 6);
  endfunction

  function automatic int s8(int v);  // sign-extend a byte
    v = v & 255;
    return (v >= 128) ? v - 256 : v;
  endfunction

endpackage
