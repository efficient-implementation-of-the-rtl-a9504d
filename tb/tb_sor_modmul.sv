// tb_sor_modmul: end-to-end test of the SOR modular multiplier in its three
// organisations, side by side:
//   dut 0: NMUL = 1, PIPE = 0  (one RNS multiplier, not pipelined)
//   dut 1: NMUL = 1, PIPE = 1  (one RNS multiplier, pipelined)
//   dut 2: NMUL = 2, PIPE = 1  (two parallel pipelined RNS multipliers)
// Each has its own driver that runs the same list of operand pairs: the
// published example X = 2^256-2^35-977, Y = 2^256-2^37-977, X = 0, and random
// values below p = 2^256-2^32-977. For every result it checks that
//  - z represents X*Y mod p plus j*p with a small j (found by search, every
//    channel compared against a wide-integer remainder),
//  - alpha equals the exact CRT overflow count of X*Y,
//  - done rises 4 + N/NMUL + 3*PIPE clock edges after the edge that sampled
//    start.
// Mechanisms that must each happen at least once: alpha = 0, alpha > 0, a
// start pulse ignored because the block is busy (the result must still be
// the one of the captured operands), and a new start accepted in the same
// cycle as done (back-to-back operation).
module tb_sor_modmul;
  import sor_pkg::*;
  import sor_tb_pkg::*;

  localparam int NDUT = 3;
  localparam int NV   = 24;
  localparam int JMAX = 64;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   cyc = 0;
  int   checks = 0, failures = 0;

  logic  [NDUT-1:0] start_s, busy_s, done_s;
  rvec_t            x_s [NDUT];
  rvec_t            y_s [NDUT];
  rvec_t            z_s [NDUT];
  logic [A_W-1:0]   alpha_s [NDUT];
  logic [K_W-1:0]   k_s [NDUT];

  u256_t xv [NV];
  u256_t yv [NV];
  int    ta [NV];

  int n_alpha_zero = 0, n_alpha_pos = 0, n_ignored = 0, n_b2b = 0, max_j = 0;
  int drivers_done = 0;

  sor_modmul #(.NMUL(1), .PIPE(1'b0)) dut0 (
    .clk(clk), .rst_n(rst_n), .start(start_s[0]), .x(x_s[0]), .y(y_s[0]),
    .busy(busy_s[0]), .done(done_s[0]), .z(z_s[0]), .alpha(alpha_s[0]), .k(k_s[0]));
  sor_modmul #(.NMUL(1), .PIPE(1'b1)) dut1 (
    .clk(clk), .rst_n(rst_n), .start(start_s[1]), .x(x_s[1]), .y(y_s[1]),
    .busy(busy_s[1]), .done(done_s[1]), .z(z_s[1]), .alpha(alpha_s[1]), .k(k_s[1]));
  sor_modmul #(.NMUL(2), .PIPE(1'b1)) dut2 (
    .clk(clk), .rst_n(rst_n), .start(start_s[2]), .x(x_s[2]), .y(y_s[2]),
    .busy(busy_s[2]), .done(done_s[2]), .z(z_s[2]), .alpha(alpha_s[2]), .k(k_s[2]));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected_latency(int d);
    int nm, pp;
    nm = (d == 2) ? 2 : 1;
    pp = (d == 0) ? 0 : 1;
    return 4 + N / nm + 3 * pp;
  endfunction

  task automatic check_result(int d, int v, int lat);
    int j;
    j = find_multiple(xv[v], yv[v], z_s[d], JMAX);
    checks += 3;
    if (j < 0) begin
      failures++;
      $display("FAIL dut%0d vector %0d: z is not X*Y mod p + j*p", d, v);
    end else if (j > max_j) max_j = j;
    if (int'(alpha_s[d]) != ta[v]) begin
      failures++;
      $display("FAIL dut%0d vector %0d: alpha=%0d expected %0d", d, v, alpha_s[d], ta[v]);
    end
    if (lat != expected_latency(d)) begin
      failures++;
      $display("FAIL dut%0d vector %0d: latency %0d expected %0d", d, v, lat, expected_latency(d));
    end
    if (ta[v] == 0) n_alpha_zero++; else n_alpha_pos++;
  endtask

  task automatic drive(int d);
    int t0, cnt;
    @(negedge clk);
    x_s[d] = to_rns(xv[0]);
    y_s[d] = to_rns(yv[0]);
    start_s[d] = 1'b1;
    t0 = cyc;
    for (int v = 0; v < NV; v++) begin
      @(negedge clk);
      start_s[d] = 1'b0;
      cnt = 0;
      while (!done_s[d]) begin
        @(negedge clk);
        cnt++;
        if (cnt == 3 && (v % 3) == 1) begin
          // start while busy: must be ignored
          checks++;
          if (!busy_s[d]) begin
            failures++;
            $display("FAIL dut%0d: not busy in the middle of an operation", d);
          end
          x_s[d] = to_rns(rand_below_p());
          y_s[d] = to_rns(rand_below_p());
          start_s[d] = 1'b1;
          n_ignored++;
        end else begin
          start_s[d] = 1'b0;
        end
        if (cnt > 100) break;
      end
      check_result(d, v, cyc - (t0 + 1));
      if (v + 1 < NV) begin
        // new operation in the same cycle as done
        x_s[d] = to_rns(xv[v+1]);
        y_s[d] = to_rns(yv[v+1]);
        start_s[d] = 1'b1;
        t0 = cyc;
        n_b2b++;
      end
    end
    drivers_done++;
  endtask

  initial begin
    start_s = '0;
    for (int d = 0; d < NDUT; d++) begin
      x_s[d] = '0;
      y_s[d] = '0;
    end
    xv[0] = PRIME - (u256_t'(1) << 35) + (u256_t'(1) << 32);
    yv[0] = PRIME - (u256_t'(1) << 37) + (u256_t'(1) << 32);
    xv[1] = '0;
    yv[1] = rand_below_p();
    xv[2] = PRIME - 1;
    yv[2] = PRIME - 1;
    for (int v = 3; v < NV; v++) begin
      xv[v] = rand_below_p();
      yv[v] = rand_below_p();
    end
    for (int v = 0; v < NV; v++) ta[v] = true_alpha(u600_t'(xv[v]) * u600_t'(yv[v]));

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      drive(0);
      drive(1);
      drive(2);
    join

    $display("alpha=0: %0d  alpha>0: %0d  ignored starts: %0d  back-to-back starts: %0d  largest j: %0d",
             n_alpha_zero, n_alpha_pos, n_ignored, n_b2b, max_j);
    checks += 4;
    if (n_alpha_zero == 0) begin failures++; $display("FAIL alpha = 0 never seen"); end
    if (n_alpha_pos == 0)  begin failures++; $display("FAIL alpha > 0 never seen"); end
    if (n_ignored == 0)    begin failures++; $display("FAIL no start while busy"); end
    if (n_b2b == 0)        begin failures++; $display("FAIL no back-to-back start"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
