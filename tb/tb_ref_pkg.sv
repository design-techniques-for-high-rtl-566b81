// tb_ref_pkg: bit-true reference models used by the testbenches.  They work
// on plain integer sample lists with direct convolution sums, independent of
// the carry-save/CSD structure of the hardware.  ">>> shift" is an
// arithmetic shift (rounding toward minus infinity), as in the hardware.
package tb_ref_pkg;
  typedef longint lq_t [$];
  typedef int     iq_t [$];

  // y[n] = (sum_k c[k] * x[n - k*zs]) >>> shift, zero history
  function automatic lq_t ref_fir(lq_t x, iq_t c, int zs, int shift);
    lq_t y;
    longint s;
    for (int n = 0; n < x.size(); n++) begin
      s = 0;
      for (int k = 0; k < c.size(); k++)
        if (n - k * zs >= 0) s += longint'(c[k]) * x[n - k * zs];
      y.push_back(s >>> shift);
    end
    return y;
  endfunction

  // y[n] = (sum_k c[k] * x[n*m + m-1 - k]) >>> shift, for every complete block
  function automatic lq_t ref_decim(lq_t x, iq_t c, int m, int shift);
    lq_t y;
    longint s;
    int i;
    for (int n = 0; n * m + m - 1 < x.size(); n++) begin
      s = 0;
      for (int k = 0; k < c.size(); k++) begin
        i = n * m + m - 1 - k;
        if (i >= 0) s += longint'(c[k]) * x[i];
      end
      y.push_back(s >>> shift);
    end
    return y;
  endfunction

  // y[n*l + p] = (sum_j c[p + l*j] * x[n - j]) >>> shift
  function automatic lq_t ref_interp(lq_t x, iq_t c, int l, int shift);
    lq_t y;
    longint s;
    for (int n = 0; n < x.size(); n++)
      for (int p = 0; p < l; p++) begin
        s = 0;
        for (int j = 0; p + l * j < c.size(); j++)
          if (n - j >= 0) s += longint'(c[p + l * j]) * x[n - j];
        y.push_back(s >>> shift);
      end
    return y;
  endfunction

  // random sample of b bits, with an occasional full-scale value
  function automatic longint rand_sample(int b);
    int r;
    r = $urandom % 64;
    if (r == 0) return (longint'(1) <<< (b - 1)) - 1;
    if (r == 1) return -(longint'(1) <<< (b - 1));
    return longint'($signed(32'($urandom))) >>> (32 - b);
  endfunction
endpackage
