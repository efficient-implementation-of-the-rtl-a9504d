// tb_sor_modmul_full: the SOR modular multiplier at its default parameters
// (two parallel pipelined RNS multipliers, p = 2^256 - 2^32 - 977, T = 72,
// q = 8, Delta = 1/16) taken through complete multiplications.
//
// The first operation is the published numerical example,
// X = 2^256-2^35-977 and Y = 2^256-2^37-977, given as RNS residues. Its
// checks: k equals the published 1846402278694734677477, alpha equals the
// exact CRT overflow count (3), z represents X*Y mod p = 217 * 2^64 plus a
// small multiple of p, and done rises 11 clock edges after start. Then 30
// random operand pairs below p follow, and finally the result of one
// operation is fed back as the operand of the next (a square chain), as in
// an exponentiation, checked against X^(2^r) mod p.
module tb_sor_modmul_full;
  import sor_pkg::*;
  import sor_tb_pkg::*;

  localparam int JMAX = 64;
  localparam int LAT  = 11;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           start = 1'b0;
  rvec_t          x, y, z;
  logic           busy, done;
  logic [A_W-1:0] alpha;
  logic [K_W-1:0] k;
  int cyc = 0;
  int checks = 0, failures = 0;

  sor_modmul dut (
    .clk(clk), .rst_n(rst_n), .start(start), .x(x), .y(y),
    .busy(busy), .done(done), .z(z), .alpha(alpha), .k(k));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One operation on residue vectors; returns the latency in clock edges.
  task automatic run(rvec_t xr, rvec_t yr, output int lat);
    int t0;
    @(negedge clk);
    x = xr;
    y = yr;
    start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    lat = cyc - (t0 + 1);
  endtask

  task automatic check(u256_t xv, u256_t yv, int lat, string what);
    int j;
    j = find_multiple(xv, yv, z, JMAX);
    checks += 3;
    if (j < 0) begin failures++; $display("FAIL %s: z is not X*Y mod p + j*p", what); end
    if (int'(alpha) != true_alpha(u600_t'(xv) * u600_t'(yv))) begin
      failures++;
      $display("FAIL %s: alpha=%0d", what, alpha);
    end
    if (lat != LAT) begin failures++; $display("FAIL %s: latency %0d", what, lat); end
  endtask

  initial begin
    u256_t xv, yv, acc;
    rvec_t zr;
    int lat;
    x = '0;
    y = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // published numerical example
    xv = PRIME - (u256_t'(1) << 35) + (u256_t'(1) << 32);
    yv = PRIME - (u256_t'(1) << 37) + (u256_t'(1) << 32);
    run(to_rns(xv), to_rns(yv), lat);
    check(xv, yv, lat, "example");
    checks += 2;
    if (k != K_W'(76'd1846402278694734677477)) begin failures++; $display("FAIL example k=%0d", k); end
    if (alpha != 3) begin failures++; $display("FAIL example alpha=%0d", alpha); end
    $display("example: alpha=%0d k=%0d latency=%0d cycles", alpha, k, lat);

    for (int t = 0; t < 30; t++) begin
      xv = rand_below_p();
      yv = rand_below_p();
      run(to_rns(xv), to_rns(yv), lat);
      check(xv, yv, lat, $sformatf("random %0d", t));
    end

    // square chain: the RNS output is fed straight back as both operands
    xv  = rand_below_p();
    acc = xv;
    zr  = to_rns(xv);
    for (int r = 0; r < 8; r++) begin
      run(zr, zr, lat);
      zr  = z;
      acc = mulmod_p(acc, acc);
      checks++;
      if (find_multiple(acc, u256_t'(1), z, JMAX) < 0) begin
        failures++;
        $display("FAIL square chain step %0d", r);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
