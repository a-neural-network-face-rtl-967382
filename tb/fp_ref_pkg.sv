// fp_ref_pkg: bit-exact reference arithmetic for the reduced floating-point
// format, used by the testbenches to work out expected results without the
// RTL. It computes with wide integers: both operands are scaled to a common
// exponent, added or multiplied exactly, and the exact result is then
// truncated toward zero to FRAC_W fraction bits, flushed to zero below the
// smallest normal exponent and saturated to infinity above the largest.
// Helper functions convert to and from real numbers and build random
// operands in a chosen exponent range.
package fp_ref_pkg;

  class fp_ref #(int EW = 6, int FW = 9);
    localparam int W    = 1 + EW + FW;
    localparam int BIAS = (1 << (EW - 1)) - 1;
    localparam int EMAX = (1 << EW) - 1;
    typedef logic [W-1:0] fp_t;
    typedef logic [511:0] big_t;

    static function automatic int expo(fp_t v);
      return int'(v[W-2 -: EW]);
    endfunction

    static function automatic fp_t inf(logic s);
      return {s, {(W-1){1'b1}}};
    endfunction

    // Pack an exact magnitude mag * 2^(e0 - BIAS - FW) with truncation.
    static function automatic fp_t pack(logic s, big_t mag, int e0);
      int p;
      int e;
      big_t f;
      p = -1;
      for (int k = 0; k < 512; k++) if (mag[k]) p = k;
      if (p < 0) return {s, {(W-1){1'b0}}};
      e = e0 + p - FW;
      if (e >= EMAX) return inf(s);
      if (e < 1) return {s, {(W-1){1'b0}}};
      if (p >= FW) f = mag >> (p - FW);
      else         f = mag << (FW - p);
      return {s, EW'(e), f[FW-1:0]};
    endfunction

    static function automatic fp_t add(fp_t a, fp_t b);
      int   ea, eb, e0;
      big_t ma, mb, sa, sb, sum;
      logic a_ge_b, sgn;
      ea = expo(a);
      eb = expo(b);
      a_ge_b = (a[W-2:0] >= b[W-2:0]);
      if (ea == EMAX || eb == EMAX) return inf(a_ge_b ? a[W-1] : b[W-1]);
      ma = (ea == 0) ? '0 : big_t'({1'b1, a[FW-1:0]});
      mb = (eb == 0) ? '0 : big_t'({1'b1, b[FW-1:0]});
      e0 = (ea < eb) ? ea : eb;
      ma = ma << (ea - e0);
      mb = mb << (eb - e0);
      sa = a[W-1] ? -ma : ma;
      sb = b[W-1] ? -mb : mb;
      sum = sa + sb;
      if (sum == '0) return '0;
      sgn = sum[511];
      if (sgn) sum = -sum;
      return pack(sgn, sum, e0);
    endfunction

    static function automatic fp_t mul(fp_t a, fp_t b);
      int   ea, eb;
      logic s;
      big_t m;
      ea = expo(a);
      eb = expo(b);
      s  = a[W-1] ^ b[W-1];
      if (ea == EMAX || eb == EMAX) return inf(s);
      if (ea == 0 || eb == 0) return {s, {(W-1){1'b0}}};
      m = big_t'({1'b1, a[FW-1:0]}) * big_t'({1'b1, b[FW-1:0]});
      // m * 2^(ea-BIAS-FW) * 2^(eb-BIAS-FW) = m * 2^((ea+eb-BIAS-FW) - BIAS - FW)
      return pack(s, m, ea + eb - BIAS - FW);
    endfunction

    static function automatic real to_real(fp_t v);
      int  e;
      real m;
      e = expo(v);
      if (e == 0) return 0.0;
      m = 1.0 + real'(v[FW-1:0]) / real'(1 << FW);
      m = m * (2.0 ** (e - BIAS));
      return v[W-1] ? -m : m;
    endfunction

    // Random finite non-zero value with unbiased exponent in [elo, ehi].
    static function automatic fp_t rand_val(int elo, int ehi);
      fp_t v;
      int  e;
      e = elo + int'($urandom_range(ehi - elo));
      v = fp_t'($urandom());
      v[W-2 -: EW] = EW'(e + BIAS);
      return v;
    endfunction

    static function automatic fp_t from_real(real r);
      logic s;
      int   e;
      real  m;
      s = (r < 0.0);
      m = s ? -r : r;
      if (m == 0.0) return '0;
      e = 0;
      while (m >= 2.0) begin m = m / 2.0; e++; end
      while (m < 1.0)  begin m = m * 2.0; e--; end
      if (e + BIAS >= EMAX) return inf(s);
      if (e + BIAS < 1) return {s, {(W-1){1'b0}}};
      return {s, EW'(e + BIAS), FW'($rtoi((m - 1.0) * real'(1 << FW)))};
    endfunction
  endclass

endpackage
