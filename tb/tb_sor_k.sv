// tb_sor_k: self-checking test of the k estimator.
//
// For random gamma vectors (each gamma_i below its modulus) the expected k is
// formed here from its definition, floor(sum_i gamma_i * floor(<M_i>_p /
// 2^(256-72)) / 2^72), with <M_i>_p = (M / m_i) mod p computed by wide
// division. It also checks the bound the reduction relies on, k*p <= S with
// S = sum_i gamma_i * <M_i>_p, and that S - k*p is below 16p. The gamma
// vector of the published numerical example must give the published
// k = 1846402278694734677477.
module tb_sor_k;
  import sor_pkg::*;
  import sor_tb_pkg::*;

  rvec_t          gamma;
  logic [K_W-1:0] k;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  sor_k dut (.gamma(gamma), .k(k));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_vector();
    u600_t bm, mip, acc, s, ek;
    bm  = big_m();
    acc = 0;
    s   = 0;
    for (int i = 0; i < NCH; i++) begin
      mip = (bm / tmod(i)) % u600_t'(PRIME);
      acc = acc + u600_t'(gamma[i]) * (mip >> (256 - 72));
      s   = s + u600_t'(gamma[i]) * mip;
    end
    ek = acc >> 72;
    #1;
    checks += 2;
    if (u600_t'(k) != ek) begin
      failures++;
      $display("FAIL k=%0d expected %0d", k, ek);
    end
    if (u600_t'(k) * u600_t'(PRIME) > s || s - u600_t'(k) * u600_t'(PRIME) >= 16 * u600_t'(PRIME)) begin
      failures++;
      $display("FAIL k out of its bound: k=%0d", k);
    end
  endtask

  initial begin
    gamma = '0;
    gamma[0] = 73'd2409161764343951463886; gamma[1] = 73'd1135107945428528244106;
    gamma[2] = 73'd135899592520116905117;  gamma[3] = 73'd7898225949981137849;
    gamma[4] = 73'd5936354770407377172;    gamma[5] = 73'd865739859861763338;
    gamma[6] = 73'd1313261649358731301;    gamma[7] = 73'd83291400022900075;
    run_vector();
    checks++;
    if (k != K_W'(76'd1846402278694734677477)) begin
      failures++;
      $display("FAIL example k=%0d", k);
    end
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < NCH; i++)
        gamma[i] = res_t'(u600_t'({$urandom, $urandom, $urandom}) % tmod(i));
      if (t == 1) for (int i = 0; i < NCH; i++) gamma[i] = res_t'(tmod(i) - 1);
      run_vector();
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
