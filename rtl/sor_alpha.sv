// sor_alpha: correction factor alpha of the sum-of-residues reduction.
//
// The CRT sum  sum_i gamma_i * M_i  exceeds the product Z by alpha*M, where
// alpha = floor(sum_i gamma_i / m_i). Each fraction gamma_i / m_i is
// estimated from the top Q bits of gamma_i, and a rectification constant
// Delta = 2^-DELTA_LOG2 is added before truncation:
//   alpha = floor( (sum_i floor(gamma_i / 2^(n_i - Q)) + 2^Q * Delta) / 2^Q ).
// The estimate is exact as long as Z < (1 - Delta) * M and N / 2^Q < Delta
// (8/256 < 1/16 with the default values), so alpha is in 0 .. N-1.
//
// Combinational: eight bit-field extractions and a small adder tree.
// The formula and Q = 8, Delta = 1/16 follow the document. The document
// scales every gamma_i by one common width n = 73; this design uses each
// channel's own width n_i, because with moduli of different sizes only the
// per-channel scaling approximates gamma_i / m_i (with the common width,
// alpha comes out as 0 where the true value is 3 in the document's own
// numerical example).
module sor_alpha
  import sor_pkg::*;
#(
  parameter int Q          = 8,
  parameter int DELTA_LOG2 = 4
) (
  input  rvec_t           gamma,
  output logic [A_W-1:0]  alpha
);

  localparam int SUM_W = Q + $clog2(N) + 1;

  logic [SUM_W-1:0] acc;

  always_comb begin
    acc = SUM_W'(1) << (Q - DELTA_LOG2);            // 2^Q * Delta
    for (int i = 0; i < N; i++) begin
      acc = acc + SUM_W'(gamma[i][NW[i]-1 -: Q]);   // floor(gamma_i / 2^(n_i-Q))
    end
    alpha = A_W'(acc >> Q);
  end

endmodule
