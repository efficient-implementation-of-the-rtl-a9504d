// tb_rns_add: self-checking test of the modulo 2^N-1 adder.
//
// Two instances, N = 73 (the widest channel) and N = 59 (the narrowest),
// are driven with corner operands (0, 1, 2^N-2, the all-ones code 2^N-1) and
// with random residues. Each result is compared with (a+b) mod (2^N-1)
// computed by wide division, and must also be canonical (below 2^N-1)
// whenever at least one operand is.
module tb_rns_add;
  localparam int NA = 73;
  localparam int NB = 59;

  logic [NA-1:0] a73, b73, r73;
  logic [NB-1:0] a59, b59, r59;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  rns_add #(.N(NA)) dut73 (.a(a73), .b(b73), .r(r73));
  rns_add #(.N(NB)) dut59 (.a(a59), .b(b59), .r(r59));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NA:0] rnd73();
    return {$urandom, $urandom, $urandom} % ((75'(1) << NA) - 1);
  endfunction

  task automatic check73(logic [NA-1:0] a, logic [NA-1:0] b);
    logic [NA+1:0] m, exp;
    logic canon_ok;
    m   = (75'(1) << NA) - 1;
    a73 = a; b73 = b;
    #1;
    exp = ((NA + 2)'(a) + (NA + 2)'(b)) % m;
    canon_ok = (&a && &b) || ((NA + 2)'(r73) < m);
    checks++;
    if (((NA + 2)'(r73) % m) != exp || !canon_ok) begin
      failures++;
      $display("FAIL n=73 a=%h b=%h r=%h exp=%h", a, b, r73, exp);
    end
  endtask

  task automatic check59(logic [NB-1:0] a, logic [NB-1:0] b);
    logic [NB+1:0] m, exp;
    logic canon_ok;
    m   = (61'(1) << NB) - 1;
    a59 = a; b59 = b;
    #1;
    exp = ((NB + 2)'(a) + (NB + 2)'(b)) % m;
    canon_ok = (&a && &b) || ((NB + 2)'(r59) < m);
    checks++;
    if (((NB + 2)'(r59) % m) != exp || !canon_ok) begin
      failures++;
      $display("FAIL n=59 a=%h b=%h r=%h exp=%h", a, b, r59, exp);
    end
  endtask

  initial begin
    logic [NA-1:0] mx73;
    logic [NB-1:0] mx59;
    mx73 = {NA{1'b1}};
    mx59 = {NB{1'b1}};
    // corners
    check73('0, '0);
    check73(mx73 - 1, 1);            // sum = 2^N-1, must wrap to 0
    check73(mx73 - 1, mx73 - 1);
    check73(mx73, 5);                // all-ones code acts as zero
    check73(mx73 - 1, 2);
    check59('0, '0);
    check59(mx59 - 1, 1);
    check59(mx59 - 1, mx59 - 1);
    check59(mx59, 7);
    for (int t = 0; t < 2000; t++) begin
      check73(NA'(rnd73()), NA'(rnd73()));
      check59(NB'({$urandom, $urandom} % ((64'(1) << NB) - 1)),
              NB'({$urandom, $urandom} % ((64'(1) << NB) - 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
