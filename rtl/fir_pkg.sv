// fir_pkg: constants, coefficient sets and elaboration-time helpers shared by
// the multiplierless FIR filters, decimators and interpolators.
//
// Coefficients are signed integers with CF = 10 fraction bits (value / 1024).
// The four sets implement the IFIR decomposition of the CDMA cellular
// channel filter (passband edge 0.064087*pi, stopband edge 0.125*pi,
// 0.1 dB ripple, 40 dB attenuation):
//   H(z) = I(z) * G(z^4)                 single-stage image suppressor
//   H(z) = I1(z) * I2(z^2) * G(z^4)      two-stage image suppressor
// The tap lengths (I: 15, G: 19, I1: 7, I2: 7) and the interpolation factors
// follow the design examples; the coefficient values themselves are this
// design's own equiripple (Parks-McClellan) designs, quantised to at most four
// signed power-of-two terms each.  Their response: I*G(z^4) 0.09 dB ripple,
// 42.8 dB attenuation; I1*I2(z^2)*G(z^4) 0.09 dB ripple, 42.7 dB attenuation.
//
// The CSD helpers recode an integer into canonic signed digit form
// (digits in {-1,0,+1}, no two adjacent non-zero digits) and give the
// "MSB fix" constant collected for each shifted term (see csd_sop).
package fir_pkg;

  localparam int CF     = 10;  // coefficient fraction bits
  localparam int IN_W   = 12;  // default input sample width
  localparam int CSD_P  = 16;  // CSD digit positions examined (|c| < 2^14)
  localparam int MAX_SPT = 4;  // signed power-of-two terms per coefficient

  localparam int N_I  = 15;
  localparam int N_G  = 19;
  localparam int N_I1 = 7;
  localparam int N_I2 = 7;

  localparam int COEF_I  [N_I]  = '{-12, -20, -17, 12, 72, 147, 212, 237,
                                    212, 147, 72, 12, -17, -20, -12};
  localparam int COEF_G  [N_G]  = '{-9, -3, 17, 25, -10, -63, -43, 102, 300, 393,
                                    300, 102, -43, -63, -10, 25, 17, -3, -9};
  localparam int COEF_I1 [N_I1] = '{-34, 4, 290, 505, 290, 4, -34};
  localparam int COEF_I2 [N_I2] = '{-42, 15, 296, 488, 296, 15, -42};

  // CSD digit of c at bit position pos: -1, 0 or +1.
  function automatic int csd_digit(int c, int pos);
    int v;
    int d;
    v = c;
    d = 0;
    for (int p = 0; p <= pos; p++) begin
      d = ((v & 1) != 0) ? 2 - (v & 3) : 0;
      v = (v - d) >>> 1;
    end
    return d;
  endfunction

  // Number of non-zero CSD digits (signed power-of-two terms) of c.
  function automatic int csd_terms(int c);
    int n;
    n = 0;
    for (int p = 0; p < CSD_P; p++)
      if (csd_digit(c, p) != 0) n++;
    return n;
  endfunction

  // Constant that the MSB-fixed terms of c*x leave out, for a B-bit input x.
  // A term +x*2^p is built as {~x[B-1], x[B-2:0]} * 2^p, which is
  // x*2^p + 2^(B-1+p); a term -x*2^p as {x[B-1], ~x[B-2:0]} * 2^p, which is
  // -x*2^p - 2^p + 2^(B-1+p).  The constant returned is minus the surplus.
  function automatic longint csd_const(int c, int b);
    longint k;
    int d;
    k = 0;
    for (int p = 0; p < CSD_P; p++) begin
      d = csd_digit(c, p);
      if (d > 0) k -= longint'(1) <<< (b - 1 + p);
      if (d < 0) k += (longint'(1) <<< p) - (longint'(1) <<< (b - 1 + p));
    end
    return k;
  endfunction

  // Vectors left after l levels of 3:2 carry-save reduction of n vectors.
  function automatic int csa_count(int n, int l);
    int v;
    v = n;
    for (int i = 0; i < l; i++)
      if (v > 2) v = v - v / 3;
    return v;
  endfunction

  // Levels of 3:2 reduction needed to bring n vectors down to two.
  function automatic int csa_levels(int n);
    int v;
    int l;
    v = n;
    l = 0;
    while (v > 2) begin
      v = v - v / 3;
      l++;
    end
    return l;
  endfunction

  // Width of an accumulator holding sum(c_k * x_k) for b-bit inputs, given the
  // sum of the coefficient magnitudes.
  function automatic int acc_width(int b, int abs_sum);
    return b + $clog2(abs_sum + 1) + 1;
  endfunction

  // Sum of coefficient magnitudes of the four sets (for word-length planning).
  localparam int ABS_I  = 1221;
  localparam int ABS_G  = 1537;
  localparam int ABS_I1 = 1161;
  localparam int ABS_I2 = 1194;

endpackage
