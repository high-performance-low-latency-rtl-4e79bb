// fp_ref_pkg: reference arithmetic for the testbenches, written from the number format's
// definition with plain integer arithmetic and no knowledge of the pipeline structure.
//
// fp_ref#(MW, EW)::add(a, b, sub) and ::mul(a, b) return the expected packed result:
// exponent field zero is zero, the smaller addend loses the bits shifted out when it is
// aligned, results are truncated, an exponent below 1 gives zero and one above the largest
// field saturates to the largest magnitude. fp_ref#(MW, EW)::make builds a number.
package fp_ref_pkg;

  class fp_ref #(int MW = 23, int EW = 8);
    typedef logic [EW+MW:0] fp_t;
    localparam int BIAS = (1 << (EW - 1)) - 1;
    localparam int EMAX = (1 << EW) - 1;

    static function fp_t make(bit s, int e, longint unsigned f);
      fp_t r;
      r = {s, EW'(e), MW'(f)};
      return r;
    endfunction

    static function bit sgn(fp_t x);
      return x[EW+MW];
    endfunction

    static function int expo(fp_t x);
      return int'(x[EW+MW-1:MW]);
    endfunction

    // Mantissa with the implicit one, zero for a zero operand.
    static function longint unsigned mant(fp_t x);
      if (expo(x) == 0) return 0;
      return (longint'(1) << MW) | longint'(x[MW-1:0]);
    endfunction

    // Pack sign, exponent and an arbitrary positive integer significand r (value r*2^(e-MW)).
    static function fp_t pack(bit s, int e, longint unsigned r);
      int p, ex;
      longint unsigned n;
      if (r == 0) return '0;
      p = 63;
      while (r[p] == 1'b0) p--;
      ex = e + (p - MW);
      if (p > MW) n = r >> (p - MW);
      else        n = r << (MW - p);
      if (ex < 1) return '0;
      if (ex > EMAX) return {s, EW'(EMAX), {MW{1'b1}}};
      return {s, EW'(ex), n[MW-1:0]};
    endfunction

    static function fp_t add(fp_t a, fp_t b, bit sub);
      bit sa, sb, a_big;
      int ea, eb, d;
      longint unsigned ma, mb, ml, msa, r;
      sa = sgn(a);
      sb = sgn(b) ^ sub;
      ea = expo(a);  eb = expo(b);
      ma = mant(a);  mb = mant(b);
      a_big = (ea > eb) || (ea == eb && ma >= mb);
      d = a_big ? ea - eb : eb - ea;
      ml  = a_big ? ma : mb;
      msa = (d >= 63) ? 0 : ((a_big ? mb : ma) >> d);
      r = (sa == sb) ? ml + msa : ml - msa;
      return pack(a_big ? sa : sb, a_big ? ea : eb, r);
    endfunction

    static function fp_t mul(fp_t a, fp_t b);
      if (expo(a) == 0 || expo(b) == 0) return '0;
      return pack(sgn(a) ^ sgn(b), expo(a) + expo(b) - BIAS - MW, mant(a) * mant(b));
    endfunction

    // Random operand: exponent within +-span of the bias, zero with probability 1/32.
    static function fp_t rnd(int span);
      int e;
      if ($urandom_range(31) == 0) return '0;
      e = BIAS - span + int'($urandom_range(2 * span));
      return make($urandom_range(1), e, {$urandom, $urandom});
    endfunction

    // Random operand near x: same or neighbouring exponent, fraction differing in low bits,
    // so that subtraction cancels many leading bits.
    static function fp_t near(fp_t x);
      int e;
      longint unsigned f;
      e = expo(x) + int'($urandom_range(2)) - 1;
      if (e < 1) e = 1;
      if (e > EMAX) e = EMAX;
      f = longint'(x[MW-1:0]) ^ (longint'($urandom) >> $urandom_range(31));
      return make($urandom_range(1), e, f);
    endfunction
  endclass

endpackage
