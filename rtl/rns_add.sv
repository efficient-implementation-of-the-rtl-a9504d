// rns_add: adder modulo 2^N-1.
//
// Two N-bit additions run side by side: A+B (carry-in 0) and A+B+1 (carry-in
// 1). When A+B+1 reaches 2^N, the carry-out of the second addition is set and
// (A+B+1) mod 2^N is the residue; otherwise A+B is. A multiplexer driven by
// that carry picks the result:
//   (A+B) mod (2^N-1) = (A+B+1) mod 2^N   if A+B+1 >= 2^N
//                     = A+B               otherwise.
// For operands below 2^N-1 the result is canonical (below 2^N-1). An operand
// equal to 2^N-1 (the second code for zero) is also accepted; only when both
// operands are 2^N-1 does the result stay 2^N-1.
//
// Purely combinational. The structure (two parallel adders, one multiplexer)
// follows the document; using the carry of the +1 adder as the select is the
// reading of its equation taken here.
module rns_add #(
  parameter int N = 73
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] r
);

  logic [N-1:0] sum0; // A + B, modulo 2^N
  logic [N:0] sum1;   // A + B + 1

  always_comb begin
    sum0 = a + b;
    sum1 = {1'b0, a} + {1'b0, b} + (N + 1)'(1);
    r    = sum1[N] ? sum1[N-1:0] : sum0;
  end

endmodule
