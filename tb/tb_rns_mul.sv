// tb_rns_mul: self-checking test of the modulo 2^N-1 multiplier.
//
// Three instances: N = 73 combinational, N = 73 with the pipeline register
// (PIPE = 1) and N = 59 combinational. Random residues and corners (0, 1,
// 2^N-2) are applied on the falling clock edge; the combinational results are
// checked at once and the pipelined result one rising edge later, which also
// checks its one-cycle latency. The reference is (a*b) mod (2^N-1) by wide
// division.
module tb_rns_mul;
  localparam int NA = 73;
  localparam int NB = 59;

  logic clk = 1'b0;
  logic [NA-1:0] a73, b73, r73c, r73p;
  logic [NB-1:0] a59, b59, r59;
  int checks = 0, failures = 0;

  rns_mul #(.N(NA), .PIPE(1'b0)) dut_c (.clk(clk), .a(a73), .b(b73), .r(r73c));
  rns_mul #(.N(NA), .PIPE(1'b1)) dut_p (.clk(clk), .a(a73), .b(b73), .r(r73p));
  rns_mul #(.N(NB), .PIPE(1'b0)) dut_s (.clk(clk), .a(a59), .b(b59), .r(r59));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2*NB+1:0] ref59(logic [NB-1:0] a, logic [NB-1:0] b);
    return ((2 * NB + 2)'(a) * (2 * NB + 2)'(b)) % (((2 * NB + 2)'(1) << NB) - 1);
  endfunction

  function automatic logic [NA-1:0] r73rand();
    return NA'({$urandom, $urandom, $urandom} % ((96'(1) << NA) - 1));
  endfunction

  task automatic apply(logic [NA-1:0] a, logic [NA-1:0] b, logic [NB-1:0] c, logic [NB-1:0] d);
    logic [2*NA+1:0] e73;
    logic [2*NB+1:0] e59;
    @(negedge clk);
    a73 = a; b73 = b; a59 = c; b59 = d;
    #1;
    e73 = ((2 * NA + 2)'(a) * (2 * NA + 2)'(b)) % (((2 * NA + 2)'(1) << NA) - 1);
    e59 = ref59(c, d);
    checks += 2;
    if ((2 * NA + 2)'(r73c) != e73) begin failures++; $display("FAIL comb73 %h*%h=%h exp %h", a, b, r73c, e73); end
    if ((2 * NB + 2)'(r59)  != e59) begin failures++; $display("FAIL comb59 %h*%h=%h exp %h", c, d, r59, e59); end
    @(posedge clk); #1;
    checks++;
    if ((2 * NA + 2)'(r73p) != e73) begin failures++; $display("FAIL pipe73 %h*%h=%h exp %h", a, b, r73p, e73); end
  endtask

  initial begin
    logic [NA-1:0] mx73;
    logic [NB-1:0] mx59;
    mx73 = {NA{1'b1}} - 1;
    mx59 = {NB{1'b1}} - 1;
    apply('0, '0, '0, '0);
    apply(1, mx73, 1, mx59);
    apply(mx73, mx73, mx59, mx59);
    apply(mx73, 2, mx59, 2);
    for (int t = 0; t < 2000; t++)
      apply(r73rand(), r73rand(),
            NB'({$urandom, $urandom} % ((64'(1) << NB) - 1)),
            NB'({$urandom, $urandom} % ((64'(1) << NB) - 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
