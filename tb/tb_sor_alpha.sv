// tb_sor_alpha: self-checking test of the alpha estimator.
//
// Real gamma vectors are built here from random operand pairs X, Y below p:
// gamma_i = ((X*Y mod m_i) * M_i^-1) mod m_i, with the inverse found by the
// extended Euclidean algorithm on wide integers, and the true
// alpha = (sum_i gamma_i * M_i - Z) / M is obtained by wide division.
// The block's estimate must equal that exact value. The vector of the
// published numerical example is also applied: its true alpha is 3. The
// numbers of vectors with alpha = 0 and alpha > 0 are reported; both must occur.
module tb_sor_alpha;
  import sor_pkg::*;
  import sor_tb_pkg::*;

  rvec_t          gamma;
  logic [A_W-1:0] alpha;
  int checks = 0, failures = 0;
  int n_zero = 0, n_pos = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  sor_alpha dut (.gamma(gamma), .alpha(alpha));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Modular inverse of a mod m by the extended Euclidean algorithm.
  function automatic u600_t inv_of(u600_t a, u600_t m);
    logic signed [601:0] r0, r1, s0, s1, q, t;
    r0 = $signed({2'b0, m}); r1 = $signed({2'b0, a % m});
    s0 = 0; s1 = 1;
    while (r1 != 0) begin
      q = r0 / r1;
      t = r0 - q * r1; r0 = r1; r1 = t;
      t = s0 - q * s1; s0 = s1; s1 = t;
    end
    if (s0 < 0) s0 = s0 + $signed({2'b0, m});
    return u600_t'(s0);
  endfunction

  task automatic run_vector(u600_t zval);
    u600_t bm, mi, inv, g, ta;
    u1100_t s;
    bm = big_m();
    s  = 0;
    for (int i = 0; i < NCH; i++) begin
      mi  = bm / tmod(i);
      inv = inv_of(mi % tmod(i), tmod(i));
      g   = u600_t'((u1100_t'(zval % tmod(i)) * u1100_t'(inv)) % u1100_t'(tmod(i)));
      gamma[i] = res_t'(g);
      s = s + u1100_t'(g) * u1100_t'(mi);
    end
    ta = u600_t'((s - u1100_t'(zval)) / u1100_t'(bm));
    #1;
    checks++;
    if (u600_t'(alpha) != ta) begin
      failures++;
      $display("FAIL alpha=%0d expected %0d", alpha, ta);
    end
    if (ta == 0) n_zero++; else n_pos++;
  endtask

  initial begin
    u256_t xv, yv;
    // published example: X = 2^256-2^35-977, Y = 2^256-2^37-977
    xv = PRIME - (u256_t'(1) << 35) + (u256_t'(1) << 32);
    yv = PRIME - (u256_t'(1) << 37) + (u256_t'(1) << 32);
    run_vector(u600_t'(xv) * u600_t'(yv));
    checks++;
    if (alpha != 3) begin failures++; $display("FAIL example alpha=%0d expected 3", alpha); end
    run_vector(0);
    run_vector(1);
    for (int t = 0; t < 300; t++) begin
      xv = rand_below_p();
      yv = (t % 10 == 0) ? u256_t'($urandom) : rand_below_p();
      run_vector(u600_t'(xv) * u600_t'(yv));
      @(posedge clk);
    end
    $display("alpha = 0 seen %0d times, alpha > 0 seen %0d times", n_zero, n_pos);
    checks++;
    if (n_zero == 0 || n_pos == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
