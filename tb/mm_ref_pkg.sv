// Reference models for the Montgomery multiplier testbenches.
//
// mm_ref#(K) holds two independent models of one multiplication:
//   mont()   - the plain binary radix-2 Montgomery recurrence with K+2
//              iterations, S = (S + A_i*B + q_i*N) / 2, q_i = parity of
//              S + A_i*B; no carry-save arithmetic. Its result is the exact
//              value the hardware must return.
//   cycles() - a word-level model of the carry-save schedule (B+N by two
//              half-adder passes, iterations with skipping, conversion) that
//              returns the expected clock cycles of each phase, from the start
//              edge to the edge after which done is seen.
package mm_ref_pkg;

  class mm_ref #(int unsigned K = 8);
    localparam int unsigned W = K + 2;
    typedef logic [K+3:0]   wide_t;
    typedef logic [W-1:0]   word_t;
    typedef logic [2*K+9:0] dbl_t;

    static function automatic wide_t mont(wide_t a, wide_t b, wide_t n);
      wide_t s = '0;
      logic  q;
      for (int i = 0; i <= int'(K) + 1; i++) begin
        q = s[0] ^ (a[i] & b[0]);
        s = (s + (a[i] ? b : '0) + (q ? n : '0)) >> 1;
      end
      return s;
    endfunction

    // True when s * 2^(K+2) = a * b (mod n).
    static function automatic bit congruent(wide_t s, wide_t a, wide_t b, wide_t n);
      dbl_t lhs = (dbl_t'(s) << (K + 2)) % dbl_t'(n);
      dbl_t rhs = (dbl_t'(a) * dbl_t'(b)) % dbl_t'(n);
      return lhs == rhs;
    endfunction

    // Two serial half-adder passes on a carry-save pair.
    static function automatic void two_ha(inout word_t ss, inout word_t sc);
      word_t t  = ss ^ sc;
      word_t c1 = (ss & sc) << 1;
      ss = t ^ c1;
      sc = (t & c1) << 1;
    endfunction

    static function automatic void cycles(wide_t a, wide_t b, wide_t n,
                                          output int pre, output int loop,
                                          output int conv, output int skips,
                                          output bit skip_last);
      word_t ss, sc, d, x, t, c, nss, nsc, ssi, sci;
      int    i;
      bit    skip, skipn, last, qh, ah, q1, q2;
      // precompute D = B + N
      ss = word_t'(b); sc = word_t'(n); pre = 1;
      while (sc != 0) begin two_ha(ss, sc); pre++; end
      d = ss;
      // iterations
      ss = '0; sc = '0; skip = 0; i = 0; loop = 0; skips = 0; skip_last = 0;
      ah = a[0]; qh = a[0] & b[0];
      forever begin
        ssi = skip ? ss >> 1 : ss;
        sci = skip ? sc >> 1 : sc;
        x   = ah ? (qh ? d : word_t'(b)) : (qh ? word_t'(n) : '0);
        t   = ssi ^ sci ^ x;
        c   = (ssi & sci) | (ssi & x) | (sci & x);
        nss = t >> 1;
        nsc = c;
        q1  = 1'(nss + nsc + (a[i+1] ? word_t'(b) : '0));
        skipn = (i <= int'(K)) && !(a[i+1] || q1 || nss[0]);
        q2  = 1'((nss >> 1) + (nsc >> 1) + (a[i+2] ? word_t'(b) : '0));
        loop++;
        last = (i == int'(K) + 1) || (i == int'(K) && skipn);
        if (skipn) skips++;
        if (last && skipn) skip_last = 1;
        i += skipn ? 2 : 1;
        ss = nss; sc = nsc; skip = skipn;
        qh = skipn ? q2 : q1;
        ah = a[i];
        if (last) break;
      end
      // conversion
      conv = 1;
      while (sc != 0 || skip) begin
        if (skip) begin ss = ss >> 1; sc = sc >> 1; skip = 0; end
        two_ha(ss, sc);
        conv++;
      end
    endfunction

    // Uniform-ish random value below lim (lim > 0).
    static function automatic wide_t rand_below(wide_t lim);
      dbl_t r = '0;
      for (int j = 0; j < ($bits(dbl_t) + 31) / 32; j++) r = (r << 32) | dbl_t'($urandom);
      return wide_t'(r % dbl_t'(lim));
    endfunction

    // Random odd K-bit modulus with its top bit set.
    static function automatic wide_t rand_modulus();
      wide_t r = rand_below(wide_t'(1) << K);
      r[K-1] = 1'b1;
      r[0]   = 1'b1;
      return r;
    endfunction
  endclass

endpackage
