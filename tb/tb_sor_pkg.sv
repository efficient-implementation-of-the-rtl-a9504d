// tb_sor_pkg: checks the elaboration-time tables of sor_pkg.
//
// The tables are compared with values computed here in a different way and
// with published reference numbers for p = 2^256 - 2^32 - 977:
//  - the moduli are 2^73-1, 2^71-1, 2^67-1, 2^65-1, 2^64-1, 2^63-1, 2^61-1
//    and 2^59-1;
//  - <M_i^-1>_{m_i} equals the published inverses, and M_i * inverse = 1
//    (mod m_i) with M_i = M / m_i formed by wide division;
//  - <-p>_{m_i}: k * <-p>_{m_i} mod m_i, with the published k, equals the
//    published step-5.1 values;
//  - <<M_j>_p>_{m_i}: gamma_j times the entry equals the published Y_ji
//    terms, and every entry equals ((M / m_j) mod p) mod m_i;
//  - <a <-M>_p>_{m_i} equals (a * ((-M) mod p)) mod m_i;
//  - the moduli are pairwise co-prime (Euclid's gcd is 1) and their product
//    M has 523 bits, above the 512 bits of a product of two field elements.
module tb_sor_pkg;
  import sor_pkg::*;
  import sor_tb_pkg::*;

  localparam rvec_t INV  = inv_tab();
  localparam rvec_t NEGP = negp_tab(P_SECP256K1);
  localparam rmat_t CM   = cm_tab(P_SECP256K1);
  localparam rmat_t ATB  = atab(P_SECP256K1);
  localparam pvec_t MIP  = mip_tab(P_SECP256K1);

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, u600_t got, u600_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic u600_t gcd(u600_t a, u600_t b);
    u600_t t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  function automatic int bitlen(u600_t v);
    for (int b = 599; b >= 0; b--) if (v[b]) return b + 1;
    return 0;
  endfunction

  initial begin
    u600_t inv_pub [NCH];
    u600_t kp_pub  [NCH];
    u600_t g_pub   [NCH];
    u600_t k_pub, bm, mi, negm;
    u1100_t t;

    inv_pub = '{600'd5386417757290016831506, 600'd930500703993780264455,
                600'd18803160785300071733,   600'd20472618723068709026,
                600'd3400417297457863576,    600'd3683224619310100934,
                600'd540231240598819487,     600'd308591480262646799};
    kp_pub  = '{600'd8283466596510442787559, 600'd374180066768676362797,
                600'd92393689274398591882,   600'd20282568479059962491,
                600'd16356846318752536699,   600'd8885520965668475841,
                600'd1215072663256523127,    600'd428518828954403760};
    g_pub   = '{600'd2409161764343951463886, 600'd1135107945428528244106,
                600'd135899592520116905117,  600'd7898225949981137849,
                600'd5936354770407377172,    600'd865739859861763338,
                600'd1313261649358731301,    600'd83291400022900075};
    k_pub   = 600'd1846402278694734677477;

    bm = big_m();
    negm = u600_t'(PRIME) - (bm % u600_t'(PRIME));

    for (int i = 0; i < NCH; i++) begin
      expect_eq($sformatf("modulus %0d", i), u600_t'(modulus(i)), tmod(i));
      expect_eq($sformatf("inverse %0d", i), u600_t'(INV[i]), inv_pub[i]);
      mi = bm / tmod(i);
      t  = (u1100_t'(mi % tmod(i)) * u1100_t'(INV[i])) % u1100_t'(tmod(i));
      expect_eq($sformatf("M_i*inv %0d", i), u600_t'(t), 1);
      expect_eq($sformatf("k*<-p> %0d", i), (k_pub * u600_t'(NEGP[i])) % tmod(i), kp_pub[i]);
      expect_eq($sformatf("<M_i>_p %0d", i), u600_t'(MIP[i]), mi % u600_t'(PRIME));
      for (int j = 0; j < NCH; j++) begin
        expect_eq($sformatf("CM %0d %0d", j, i), u600_t'(CM[j][i]),
                  ((bm / tmod(j)) % u600_t'(PRIME)) % tmod(i));
      end
      for (int a = 0; a < NCH; a++) begin
        expect_eq($sformatf("ATAB %0d %0d", a, i), u600_t'(ATB[a][i]),
                  (u600_t'(a) * negm) % tmod(i));
      end
    end
    for (int i = 0; i < NCH; i++) begin
      for (int j = i + 1; j < NCH; j++) begin
        expect_eq($sformatf("gcd(m%0d,m%0d)", i, j), gcd(u600_t'(modulus(i)), u600_t'(modulus(j))), 1);
      end
    end
    expect_eq("M bit length", u600_t'(bitlen(bm)), 523);
    // Published Y terms: Y_11, Y_12, Y_21, Y_88.
    expect_eq("Y11", g_pub[0] * u600_t'(CM[0][0]), 600'd681867765270114117420133393408490086262906);
    expect_eq("Y12", g_pub[0] * u600_t'(CM[0][1]), 600'd1411099900061574858572502791209519202960572);
    expect_eq("Y21", g_pub[1] * u600_t'(CM[1][0]), 600'd2659261440602693086991442234037531836892694);
    expect_eq("Y88", g_pub[7] * u600_t'(CM[7][7]), 600'd32784220094420210358569677415064275);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
