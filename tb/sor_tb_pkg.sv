// sor_tb_pkg: reference arithmetic shared by the SOR testbenches.
//
// Everything here is written from the mathematical definitions with wide
// integer arithmetic (division and remainder on up to 1100-bit values), not
// from the RTL's structure: residues are plain remainders, and the moduli are
// the widths 73, 71, 67, 65, 64, 63, 61, 59 of Table-1 style 2^n-1 moduli.
package sor_tb_pkg;

  localparam int NCH = 8;
  localparam int TW [NCH] = '{73, 71, 67, 65, 64, 63, 61, 59};

  typedef logic [255:0]  u256_t;
  typedef logic [599:0]  u600_t;
  typedef logic [1099:0] u1100_t;
  typedef logic [72:0]   r73_t;

  localparam u256_t PRIME = (u256_t'(1) << 255) * 2 - (u256_t'(1) << 32) - 977;

  function automatic u600_t tmod(int i);
    return (u600_t'(1) << TW[i]) - 1;
  endfunction

  // Residue of a 600-bit value in channel i.
  function automatic r73_t res_of(u600_t v, int i);
    return r73_t'(v % tmod(i));
  endfunction

  // Random value below the prime, from eight 32-bit words.
  function automatic u256_t rand_below_p();
    u256_t v;
    for (int w = 0; w < 8; w++) v[w*32 +: 32] = $urandom;
    return v % PRIME;
  endfunction

  // (a * b) mod PRIME
  function automatic u256_t mulmod_p(u256_t a, u256_t b);
    u600_t t;
    t = (u600_t'(a) * u600_t'(b)) % u600_t'(PRIME);
    return u256_t'(t);
  endfunction

  // Product of all moduli, M (523 bits).
  function automatic u600_t big_m();
    u1100_t acc;
    acc = 1;
    for (int i = 0; i < NCH; i++) acc = acc * u1100_t'(tmod(i));
    return u600_t'(acc);
  endfunction

  // Modular inverse of a mod m by the extended Euclidean algorithm.
  function automatic u600_t inv_of(u600_t a, u600_t m);
    logic signed [601:0] r0, r1, s0, s1, q, t;
    r0 = $signed({2'b0, m});
    r1 = $signed({2'b0, a % m});
    s0 = 0;
    s1 = 1;
    while (r1 != 0) begin
      q = r0 / r1;
      t = r0 - q * r1; r0 = r1; r1 = t;
      t = s0 - q * s1; s0 = s1; s1 = t;
    end
    if (s0 < 0) s0 = s0 + $signed({2'b0, m});
    return u600_t'(s0);
  endfunction

  // Exact CRT overflow count of Z: alpha = (sum_i gamma_i M_i - Z) / M with
  // gamma_i = (Z * M_i^-1) mod m_i.
  function automatic int true_alpha(u600_t zval);
    u600_t bm, mi, g;
    u1100_t s;
    bm = big_m();
    s  = 0;
    for (int i = 0; i < NCH; i++) begin
      mi = bm / tmod(i);
      g  = u600_t'((u1100_t'(zval % tmod(i)) * u1100_t'(inv_of(mi % tmod(i), tmod(i))))
                   % u1100_t'(tmod(i)));
      s  = s + u1100_t'(g) * u1100_t'(mi);
    end
    return int'((s - u1100_t'(zval)) / u1100_t'(bm));
  endfunction

  // The residue vector z (one 73-bit word per channel, channel 0 first) must
  // represent X*Y mod p plus a small multiple j of p. Returns that j, or -1
  // when no j below jmax fits.
  function automatic int find_multiple(u256_t xv, u256_t yv, logic [NCH-1:0][72:0] z, int jmax);
    u600_t zp, v;
    logic ok;
    zp = u600_t'(mulmod_p(xv, yv));
    for (int j = 0; j < jmax; j++) begin
      v  = zp + u600_t'(j) * u600_t'(PRIME);
      ok = 1'b1;
      for (int i = 0; i < NCH; i++) if (u600_t'(z[i]) != v % tmod(i)) ok = 1'b0;
      if (ok) return j;
    end
    return -1;
  endfunction

  // Residues of a 256-bit value, channel 0 first.
  function automatic logic [NCH-1:0][72:0] to_rns(u256_t v);
    logic [NCH-1:0][72:0] r;
    for (int i = 0; i < NCH; i++) r[i] = res_of(u600_t'(v), i);
    return r;
  endfunction

endpackage
