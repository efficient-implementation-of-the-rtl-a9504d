// tb_rns_fold: self-checking test of the wide-value reduction modulo 2^N-1.
//
// Instances for the two ways the SOR multiplier uses it: a 76-bit value (the
// width of k) reduced modulo 2^73-1 and modulo 2^59-1, and a 73-bit value
// reduced modulo 2^61-1. Random inputs, all-ones inputs and exact multiples
// of the modulus are compared (a 146-bit instance, whose two pieces can both
// be all ones, exercises the final mapping of the all-ones code to zero) with a % (2^N-1) computed by wide division;
// the output must be canonical (below 2^N-1).
module tb_rns_fold;
  logic clk = 1'b0;
  logic [75:0] a76;
  logic [72:0] a73;
  logic [72:0] r_a;
  logic [58:0] r_b;
  logic [60:0] r_c;
  logic [72:0] r_d;
  int checks = 0, failures = 0;

  rns_fold #(.IN_W(76), .N(73)) dut_a (.a(a76), .r(r_a));
  rns_fold #(.IN_W(76), .N(59)) dut_b (.a(a76), .r(r_b));
  rns_fold #(.IN_W(73), .N(61)) dut_c (.a(a73), .r(r_c));
  rns_fold #(.IN_W(146), .N(73)) dut_d (.a({a73, a73}), .r(r_d));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [75:0] v, logic [72:0] w);
    logic [75:0] ea, eb;
    logic [72:0] ec;
    logic [146:0] ed;
    a76 = v; a73 = w;
    #1;
    ea = v % ((76'(1) << 73) - 1);
    eb = v % ((76'(1) << 59) - 1);
    ec = w % ((73'(1) << 61) - 1);
    ed = {1'b0, w, w} % ((147'(1) << 73) - 1);
    checks += 4;
    if (147'(r_d) != ed) begin failures++; $display("FAIL 146->73 %h: %h exp %h", w, r_d, ed); end
    if (76'(r_a) != ea) begin failures++; $display("FAIL 76->73 %h: %h exp %h", v, r_a, ea); end
    if (76'(r_b) != eb) begin failures++; $display("FAIL 76->59 %h: %h exp %h", v, r_b, eb); end
    if (73'(r_c) != ec) begin failures++; $display("FAIL 73->61 %h: %h exp %h", w, r_c, ec); end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply((76'(1) << 73) - 1, (73'(1) << 61) - 1);          // the modulus itself
    apply(((76'(1) << 59) - 1) * 76'(37), ((73'(1) << 61) - 1) * 73'(5));
    apply(76'(1) << 73, 73'(1) << 61);
    for (int t = 0; t < 3000; t++) begin
      apply({$urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom});
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
