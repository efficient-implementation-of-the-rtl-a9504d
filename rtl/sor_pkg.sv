// sor_pkg: moduli set and pre-computed constants of the sum-of-residues (SOR)
// modular multiplier.
//
// The residue number system uses eight pairwise co-prime moduli of the form
// 2^n-1, {2^(d+6)-1, 2^(d+4)-1, 2^d-1, 2^(d-2)-1, 2^(d-3)-1, 2^(d-4)-1,
// 2^(d-6)-1, 2^(d-8)-1} with d = 6b+1. With b = 11 (d = 67) the widths are
// 73, 71, 67, 65, 64, 63, 61 and 59 bits and the dynamic range M is 523 bits,
// enough for the 512-bit product of two 256-bit field elements.
//
// The SOR algorithm needs five tables that depend only on the moduli and on
// the field prime p. Instead of storing them as literal numbers, this package
// provides constant functions that compute them at elaboration time from p,
// so the same RTL serves any 256-bit prime:
//   inv_tab()        <M_i^-1>_{m_i}          (modular inverse, extended Euclid)
//   negp_tab(p)      <-p>_{m_i}
//   mip_tab(p)       <M_i>_p                 (full 256-bit values)
//   cm_tab(p)        [j][i] = <<M_j>_p>_{m_i}
//   atab(p)          [a][i] = <a * <-M>_p>_{m_i}, a = 0 .. N-1 (row 0 is zero)
// M = prod m_i and M_i = M / m_i. Residues are held in MAXW = 73-bit words;
// a channel with a narrower modulus keeps its upper bits at zero.
//
// The moduli set, b = 11 and the table definitions follow the document; the
// choice to compute the tables with constant functions is this design's.
package sor_pkg;

  localparam int B    = 11;          // moduli-set index b
  localparam int D    = 6 * B + 1;   // d = 67
  localparam int N    = 8;           // number of moduli
  localparam int MAXW = D + 6;       // widest modulus, 73 bits
  localparam int PW   = 256;         // field width W = ceil(log2 p)
  localparam int K_W  = MAXW + $clog2(N);  // width of the correction factor k
  localparam int A_W  = $clog2(N) + 1;     // width of the correction factor alpha

  // Widths n_i of the moduli m_i = 2^n_i - 1, largest first.
  localparam int NW [N] = '{D + 6, D + 4, D, D - 2, D - 3, D - 4, D - 6, D - 8};

  // Prime of the 256-bit field used by the document's example (SEC2P256K1).
  localparam logic [PW-1:0] P_SECP256K1 =
      256'hFFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFE_FFFFFC2F;

  typedef logic [MAXW-1:0]          res_t;    // one residue
  typedef res_t [N-1:0]             rvec_t;   // one residue per channel
  typedef rvec_t [N-1:0]            rmat_t;   // [row][channel]
  typedef logic [PW-1:0]            pw_t;     // one value modulo p
  typedef logic [N-1:0][PW-1:0]     pvec_t;   // one 256-bit value per channel
  typedef logic [PW+7:0]            pwx_t;    // small multiple of a value modulo p

  // Intermediate widths for the constant arithmetic.
  localparam int WW = 2 * PW + 8;             // products modulo p
  typedef logic [WW-1:0]            wide_t;
  typedef logic [2*MAXW+1:0]        dres_t;   // products modulo m_i

  // m_i = 2^n_i - 1
  function automatic res_t modulus(int i);
    return {MAXW{1'b1}} >> (MAXW - NW[i]);
  endfunction

  // <M_i>_p = prod_{j != i} m_j mod p
  function automatic logic [PW-1:0] mi_mod_p(int i, logic [PW-1:0] p);
    wide_t acc;
    acc = 1;
    for (int j = 0; j < N; j++) begin
      if (j != i) acc = (acc * wide_t'(modulus(j))) % wide_t'(p);
    end
    return acc[PW-1:0];
  endfunction

  // <M>_p = prod_j m_j mod p
  function automatic logic [PW-1:0] m_mod_p(logic [PW-1:0] p);
    wide_t acc;
    acc = 1;
    for (int j = 0; j < N; j++) acc = (acc * wide_t'(modulus(j))) % wide_t'(p);
    return acc[PW-1:0];
  endfunction

  // <M_i>_{m_i}
  function automatic res_t mi_mod_mi(int i);
    dres_t acc;
    dres_t mi;
    mi  = dres_t'(modulus(i));
    acc = 1;
    for (int j = 0; j < N; j++) begin
      if (j != i) acc = (acc * (dres_t'(modulus(j)) % mi)) % mi;
    end
    return res_t'(acc);
  endfunction

  // Inverse of a modulo m by the extended Euclidean algorithm (gcd(a,m) = 1).
  function automatic res_t inv_mod(res_t a, res_t m);
    logic signed [2*MAXW+5:0] r0, r1, s0, s1, qt, tmp;
    r0 = $signed({4'b0, dres_t'(m)});
    r1 = $signed({4'b0, dres_t'(a)});
    s0 = 0;
    s1 = 1;
    while (r1 != 0) begin
      qt  = r0 / r1;
      tmp = r0 - qt * r1; r0 = r1; r1 = tmp;
      tmp = s0 - qt * s1; s0 = s1; s1 = tmp;
    end
    if (s0 < 0) s0 = s0 + $signed({4'b0, dres_t'(m)});
    return res_t'(s0);
  endfunction

  function automatic rvec_t inv_tab();
    rvec_t t;
    for (int i = 0; i < N; i++) t[i] = inv_mod(mi_mod_mi(i), modulus(i));
    return t;
  endfunction

  function automatic rvec_t negp_tab(logic [PW-1:0] p);
    rvec_t t;
    res_t  r;
    for (int i = 0; i < N; i++) begin
      r    = res_t'(p % pw_t'(modulus(i)));
      t[i] = (r == 0) ? res_t'(0) : modulus(i) - r;
    end
    return t;
  endfunction

  function automatic pvec_t mip_tab(logic [PW-1:0] p);
    pvec_t t;
    for (int i = 0; i < N; i++) t[i] = mi_mod_p(i, p);
    return t;
  endfunction

  function automatic rmat_t cm_tab(logic [PW-1:0] p);
    rmat_t t;
    logic [PW-1:0] v;
    for (int j = 0; j < N; j++) begin
      v = mi_mod_p(j, p);
      for (int i = 0; i < N; i++) t[j][i] = res_t'(v % pw_t'(modulus(i)));
    end
    return t;
  endfunction

  function automatic rmat_t atab(logic [PW-1:0] p);
    rmat_t t;
    logic [PW-1:0] mp, negm;
    pwx_t v;
    mp   = m_mod_p(p);
    negm = (mp == 0) ? '0 : p - mp;
    for (int a = 0; a < N; a++) begin
      v = pwx_t'(a) * pwx_t'(negm);
      for (int i = 0; i < N; i++) t[a][i] = res_t'(v % pwx_t'(modulus(i)));
    end
    return t;
  endfunction

endpackage
