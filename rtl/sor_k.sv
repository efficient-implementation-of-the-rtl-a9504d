// sor_k: correction factor k of the sum-of-residues reduction.
//
// After the CRT sum has been taken modulo p channel by channel, the integer
// S = sum_i gamma_i * <M_i>_p is still up to about N * 2^73 times p. k is the
// number of multiples of p to remove from it, estimated from the top T bits
// of each 256-bit constant <M_i>_p:
//   k = floor( sum_i gamma_i * floor(<M_i>_p / 2^(W-T)) / 2^T ).
// k never exceeds S / p, so S - k*p stays non-negative, and the error of the
// estimate leaves only a few multiples of p in the final result.
//
// Combinational: N multipliers of MAXW x T bits, an adder tree and a shift.
// The constants are computed at elaboration from the prime P (sor_pkg).
// The formula and T = 72 follow the document; computing all N products in
// parallel rather than one per cycle is this design's choice.
module sor_k
  import sor_pkg::*;
#(
  parameter logic [PW-1:0] P = P_SECP256K1,
  parameter int            T = 72
) (
  input  rvec_t           gamma,
  output logic [K_W-1:0]  k
);

  localparam pvec_t MIP   = mip_tab(P);
  localparam int    ACC_W = MAXW + T + $clog2(N);

  logic [ACC_W-1:0] acc;

  always_comb begin
    acc = '0;
    for (int i = 0; i < N; i++) begin
      acc = acc + ACC_W'(gamma[i]) * ACC_W'(MIP[i][PW-1 -: T]);
    end
    k = K_W'(acc >> T);
  end

endmodule
