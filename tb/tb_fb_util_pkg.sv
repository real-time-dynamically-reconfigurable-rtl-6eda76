// tb_fb_util_pkg: reference model shared by the filterbank testbenches.
//
// It computes, independently of the RTL, what the hardware must produce:
// bitstream images (synchronisation word, header, distributed-arithmetic
// table entries, where entry e of group g is the sum of the coefficients
// h[g*4+j] for which bit j of e is set), and the filtered value of a line
// of samples: y[n] = sum_k h[k]*x[n-k] with x = 0 before the line starts,
// shifted right arithmetically and saturated to 16 bits.
package tb_fb_util_pkg;

  localparam int NT = 16;
  localparam int LI = 4;
  localparam int NW = (NT / LI) * (1 << LI);   // table entries
  localparam int BSW = NW + 2;                  // image words

  typedef int coef_t [NT];

  function automatic int sat16(longint acc, int shift);
    longint s;
    s = acc >>> shift;
    if (s > 32767)  return 32767;
    if (s < -32768) return -32768;
    return int'(s);
  endfunction

  function automatic bit is_sat(longint acc, int shift);
    longint s;
    s = acc >>> shift;
    return (s > 32767) || (s < -32768);
  endfunction

  // table entry e of group g
  function automatic int lut_entry(coef_t h, int g, int e);
    int s;
    s = 0;
    for (int j = 0; j < LI; j++) if (e[j]) s += h[g*LI + j];
    return s;
  endfunction

  // word w of the image for coefficients h
  function automatic logic [31:0] image_word(coef_t h, int shift, int id, int w);
    if (w == 0) return 32'hAA99_5566;
    if (w == 1) return {16'(id), 11'd0, 5'(shift)};
    return 32'(lut_entry(h, (w - 2) / (1 << LI), (w - 2) % (1 << LI)));
  endfunction

  // full-precision filter output at position n of line x
  function automatic longint fir_acc(coef_t h, int x[], int n);
    longint acc;
    acc = 0;
    for (int k = 0; k < NT; k++)
      if (n - k >= 0) acc += longint'(h[k]) * longint'(x[n-k]);
    return acc;
  endfunction

  // random coefficients of magnitude below 2**(bits-1)
  function automatic coef_t rand_coefs(int bits, int ntaps);
    coef_t h;
    for (int k = 0; k < NT; k++) begin
      if (k < ntaps) h[k] = $signed($urandom_range(0, (1 << bits) - 1)) - (1 << (bits - 1));
      else           h[k] = 0;
    end
    return h;
  endfunction

endpackage
