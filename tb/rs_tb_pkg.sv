// rs_tb_pkg: reference arithmetic for the Reed-Solomon testbenches, written
// independently of the design: GF(2^6) through exp/log tables built from
// x^6 + x + 1, encoding by polynomial long division by
// g(x) = prod_{i=1..12}(x - alpha^i), and syndrome evaluation.
// Code words are arrays c[0..62] in transmission order: c[0] is the
// coefficient of x^62.
package rs_tb_pkg;
  typedef int cw_t [63];
  typedef int msg_t [51];

  function automatic int gexp(int e);
    int v = 1;
    for (int i = 0; i < (e % 63 + 63) % 63; i++) begin
      v = v << 1;
      if (v & 64) v = v ^ 'h43;
    end
    return v;
  endfunction

  // searched by stepping through the powers of alpha (a data-dependent
  // loop, kept small for the simulator)
  function automatic int glog(int a);
    int e, v;
    e = 0;
    v = 1;
    while (v != a && e < 63) begin
      v = v << 1;
      if (v & 64) v = v ^ 'h43;
      e++;
    end
    return (e < 63) ? e : -1;
  endfunction

  function automatic int gmul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return gexp(glog(a) + glog(b));
  endfunction

  // generator coefficients, gen[j] multiplies x^j
  function automatic void generator(output int gen[13]);
    for (int j = 0; j < 13; j++) gen[j] = 0;
    gen[0] = 1;
    for (int i = 1; i <= 12; i++) begin
      for (int j = 12; j > 0; j--) gen[j] = gen[j-1] ^ gmul(gen[j], gexp(i));
      gen[0] = gmul(gen[0], gexp(i));
    end
  endfunction

  function automatic cw_t encode(msg_t m);
    int gen[13];
    int rem[63];
    cw_t c;
    generator(gen);
    // rem holds m(x) x^12, highest degree first
    for (int i = 0; i < 63; i++) rem[i] = (i < 51) ? m[i] : 0;
    for (int i = 0; i < 51; i++) begin
      int coef = rem[i];
      if (coef != 0)
        for (int j = 0; j <= 12; j++) rem[i + j] ^= gmul(coef, gen[12 - j]);
    end
    for (int i = 0; i < 63; i++) c[i] = (i < 51) ? m[i] : rem[i];
    return c;
  endfunction

  // S_i = c(alpha^i)
  function automatic int syndrome(cw_t c, int i);
    int s = 0;
    for (int k = 0; k < 63; k++) s = gmul(s, gexp(i)) ^ c[k];
    return s;
  endfunction
endpackage
