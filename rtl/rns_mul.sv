// rns_mul: multiplier modulo 2^N-1.
//
// The full 2N-bit product S = A*B is split into its high half S2 and low
// half S1. Since 2^N = 1 (mod 2^N-1), S = S2*2^N + S1 = S2 + S1, so one
// modulo 2^N-1 addition (rns_add) of the two halves finishes the reduction.
// For operands below 2^N-1, S2 is at most 2^N-3 and the result is canonical.
//
// Timing: with PIPE = 0 the block is combinational. With PIPE = 1 a register
// holds S between the multiplier and the adder, so the result appears one
// clock after the operands. The multiplier-then-adder structure follows the
// document; the optional register is this design's way of building its
// pipelined organisations. clk is unused when PIPE = 0.
module rns_mul #(
  parameter int N    = 73,
  parameter bit PIPE = 1'b0
) (
  input  logic         clk,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] r
);

  logic [2*N-1:0] s;      // full product
  logic [2*N-1:0] s_q;    // product seen by the reduction adder

  assign s = (2 * N)'(a) * (2 * N)'(b);

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk) s_q <= s;
  end else begin : g_comb
    assign s_q = s;
  end

  rns_add #(.N(N)) u_add (
    .a(s_q[2*N-1:N]),   // S2
    .b(s_q[N-1:0]),     // S1
    .r(r)
  );

endmodule
