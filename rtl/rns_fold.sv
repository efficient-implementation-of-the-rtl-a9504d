// rns_fold: reduction of a wide unsigned value modulo 2^N-1.
//
// The input is cut into N-bit pieces (the last one zero-extended). Because
// 2^N = 1 (mod 2^N-1), the value is congruent to the sum of its pieces, which
// a chain of rns_add adders accumulates. A last step maps the all-ones code
// (the second representation of zero) to zero, so the output is always
// canonical, below 2^N-1.
//
// Combinational. The SOR multiplier uses it to bring a residue of one channel
// (gamma_j) or the correction factor k into the range of another channel
// before a channel multiplication. Both the block and its structure are this
// design's choice: the document only says that the channel products are
// followed by combinational reduction logic.
module rns_fold #(
  parameter int IN_W = 76,
  parameter int N    = 73
) (
  input  logic [IN_W-1:0] a,
  output logic [N-1:0]    r
);

  localparam int PIECES = (IN_W + N - 1) / N;

  logic [PIECES*N-1:0]       a_ext;
  logic [PIECES-1:0][N-1:0]  acc;

  assign a_ext = (PIECES * N)'(a);
  assign acc[0] = a_ext[N-1:0];

  for (genvar g = 1; g < PIECES; g++) begin : g_chain
    rns_add #(.N(N)) u_add (
      .a(acc[g-1]),
      .b(a_ext[g*N +: N]),
      .r(acc[g])
    );
  end

  assign r = (&acc[PIECES-1]) ? '0 : acc[PIECES-1];

endmodule
