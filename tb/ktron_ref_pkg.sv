// ktron_ref_pkg -- reference model of the KTRON arithmetic for the testbenches.
//
// Computes, with plain 64-bit integer arithmetic and no knowledge of the RTL
// structure, what the core must return: the Pre_Kernel sum (squared distance
// or inner product, Q.26), the kernel-table index, and the accumulated
// estimate b*2^13 + sum w_i*K_i (Q.26). Also supplies the Gaussian table
// entry n = round(8192 * exp(-n/128)) and helpers for Q3.13 conversion.
package ktron_ref_pkg;

  function automatic int gauss_entry(int n);
    real v;
    v = 8192.0 * $exp(-real'(n) / 128.0);
    return int'(v + 0.5);
  endfunction

  // Saturating conversion of a real to Q3.13.
  function automatic int to_q13(real v);
    real s;
    s = v * 8192.0;
    if (s > 32767.0)  return 32767;
    if (s < -32768.0) return -32768;
    return (s >= 0.0) ? int'(s + 0.5) : -int'(-s + 0.5);
  endfunction

  // Pre_Kernel result for vectors a and b of length r (entries Q3.13).
  function automatic longint pre_kernel(bit dot, int r, const ref int a[], const ref int b[]);
    longint s;
    s = 0;
    for (int j = 0; j < r; j++) begin
      if (dot) s += longint'(a[j]) * longint'(b[j]);
      else     s += (longint'(a[j]) - longint'(b[j])) * (longint'(a[j]) - longint'(b[j]));
    end
    return s;
  endfunction

  // Kernel-table index for Pre_Kernel result p.
  function automatic int lut_index(bit dot, int shift, longint p);
    longint q;
    q = p >>> shift;
    if (!dot) begin
      if (q < 0)    return 0;
      if (q > 1023) return 1023;
      return int'(q);
    end
    if (q < -512) return 0;
    if (q > 511)  return 1023;
    return int'(q) + 512;
  endfunction

  // Full estimate: sv holds m vectors of r features row by row.
  function automatic longint estimate(bit dot, int shift, int m, int r,
                                      const ref int sv[], const ref int x[],
                                      const ref int w[], const ref int lut[], int b);
    longint acc;
    int     row[];
    acc = longint'(b) * 8192;
    row = new[r];
    for (int i = 0; i < m; i++) begin
      for (int j = 0; j < r; j++) row[j] = sv[i*r + j];
      acc += longint'(w[i]) * longint'(lut[lut_index(dot, shift, pre_kernel(dot, r, row, x))]);
    end
    return acc;
  endfunction

  function automatic int saturate_q13(longint acc);
    longint q;
    q = acc >>> 13;
    if (q > 32767)  return 32767;
    if (q < -32768) return -32768;
    return int'(q);
  endfunction

endpackage
