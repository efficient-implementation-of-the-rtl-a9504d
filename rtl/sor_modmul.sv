// sor_modmul: RNS modular multiplier Z = X*Y mod p by the improved
// sum-of-residues (SOR) reduction, over the moduli set of sor_pkg
// (eight moduli 2^n_i-1, n_i = 73, 71, 67, 65, 64, 63, 61, 59).
//
// Algorithm (all per channel i, m_i = 2^n_i-1, M = prod m_i, M_i = M/m_i):
//   1. xy_i    = <x_i * y_i>_{m_i}
//   2. gamma_i = <xy_i * <M_i^-1>_{m_i}>_{m_i}
//   3. sum_i   = < sum_j gamma_j * <<M_j>_p>_{m_i} >_{m_i}
//   4. alpha   = CRT overflow count (sor_alpha), k = multiples of p (sor_k)
//   5. kp_i    = <k * <-p>_{m_i}>_{m_i},  a_i = <alpha * <-M>_p>_{m_i} (table)
//   6. z_i     = <sum_i + a_i + kp_i>_{m_i}
// The residues z_i represent V = sum_j gamma_j <M_j>_p + alpha <-M>_p - k p,
// an integer congruent to X*Y modulo p and smaller than a few times p (the
// usual non-fully-reduced output of SOR, fit to be fed back as an operand).
//
// Organisation: NMUL "RNS multipliers", each made of one rns_mul per channel,
// are shared by all steps. Steps 1, 2 and 5.1 use RNS multiplier 0 for one
// issue each; step 3 takes R = N/NMUL issues, RNS multiplier u handling term
// j = r*NMUL+u in round r, and all results of a round are accumulated into
// sum_i with modular adders. gamma_j (and k, for step 5.1) is brought into
// channel i by an rns_fold in front of each channel multiplier. alpha and k
// are computed from the gamma registers while step 3 runs. With PIPE = 1 a
// register sits inside every channel multiplier; the controller then waits
// one cycle after each step whose results the next step reads.
//   NMUL = 1, PIPE = 0 : one RNS multiplier, not pipelined  (SOR_1M_N)
//   NMUL = 1, PIPE = 1 : one RNS multiplier, pipelined      (SOR_1M_P)
//   NMUL = 2, PIPE = 1 : two parallel pipelined multipliers (SOR_2M, default)
//
// Interface and timing: when idle, a one-cycle start pulse captures x and y.
// busy is high until the result is ready; done pulses for one cycle when z,
// alpha and k hold the new result, and they keep it until the next done.
// done rises 4 + N/NMUL + 3*PIPE clock edges after the edge that samples
// start (11 for the default), and a new start may be given in the cycle in
// which done is high. A start pulse
// while busy is ignored. Residues sit in 73-bit words, channel 0 (2^73-1)
// first; the upper bits of the narrower channels are ignored on x and y and
// are always zero on z. Reset (rst_n, asynchronous, active low) clears the
// control state and the outputs.
//
// The algorithm, the tables, the moduli and T, Q, Delta follow the document,
// which names the three organisations but does not give their insides: the
// schedule, the handshake, the fold units and the full modular reduction of
// z_i in step 6 are this design's choices.
module sor_modmul
  import sor_pkg::*;
#(
  parameter logic [PW-1:0] P          = P_SECP256K1,
  parameter int            T          = 72,
  parameter int            Q          = 8,
  parameter int            DELTA_LOG2 = 4,
  parameter int            NMUL       = 2,
  parameter bit            PIPE       = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  rvec_t           x,
  input  rvec_t           y,
  output logic            busy,
  output logic            done,
  output rvec_t           z,
  output logic [A_W-1:0]  alpha,
  output logic [K_W-1:0]  k
);

  // ---------------------------------------------------------------------
  // Constants
  // ---------------------------------------------------------------------
  localparam int    R    = N / NMUL;                   // rounds of step 3
  localparam int    RC_W = (R > 1) ? $clog2(R) : 1;
  localparam rvec_t INV  = inv_tab();                  // <M_i^-1>_{m_i}
  localparam rvec_t NEGP = negp_tab(P);                // <-p>_{m_i}
  localparam rmat_t CM   = cm_tab(P);                  // [j][i] <<M_j>_p>_{m_i}
  localparam rmat_t ATAB = atab(P);                    // [a][i] <a<-M>_p>_{m_i}

  typedef enum logic [2:0] {
    ST_IDLE, ST_XY, ST_GAMMA, ST_YSUM, ST_KP, ST_DRAIN, ST_FINAL
  } state_t;

  typedef enum logic [2:0] {
    OP_NONE, OP_XY, OP_GAMMA, OP_YSUM, OP_KP
  } op_t;

  // ---------------------------------------------------------------------
  // Registers
  // ---------------------------------------------------------------------
  state_t           state, after_drain;
  logic [RC_W-1:0]  rnd;
  op_t              issue_op, issue_op_q, wb_op;
  rvec_t            x_q, y_q, xy_q, gamma_q, sum_q, kp_q, z_q;
  logic [A_W-1:0]   alpha_q;
  logic [K_W-1:0]   k_q;

  // ---------------------------------------------------------------------
  // Datapath
  // ---------------------------------------------------------------------
  logic [A_W-1:0]        alpha_c;
  logic [K_W-1:0]        k_c;
  rvec_t [NMUL-1:0]      mres;       // channel products of each RNS multiplier
  rvec_t [NMUL:0]        ysum;       // running accumulation of one round
  rvec_t                 z_next;

  always_comb begin
    unique case (state)
      ST_XY:    issue_op = OP_XY;
      ST_GAMMA: issue_op = OP_GAMMA;
      ST_YSUM:  issue_op = OP_YSUM;
      ST_KP:    issue_op = OP_KP;
      default:  issue_op = OP_NONE;
    endcase
  end

  assign wb_op = PIPE ? issue_op_q : issue_op;

  sor_alpha #(.Q(Q), .DELTA_LOG2(DELTA_LOG2)) u_alpha (
    .gamma(gamma_q),
    .alpha(alpha_c)
  );

  sor_k #(.P(P), .T(T)) u_k (
    .gamma(gamma_q),
    .k(k_c)
  );

  for (genvar u = 0; u < NMUL; u++) begin : g_unit
    // Term j of step 3 handled by this RNS multiplier in the current round.
    logic [K_W-1:0] fold_in;
    always_comb begin
      if (issue_op == OP_KP) fold_in = k_q;
      else                   fold_in = K_W'(gamma_q[int'(rnd) * NMUL + u]);
    end

    for (genvar i = 0; i < N; i++) begin : g_ch
      localparam int NI = NW[i];
      logic [NI-1:0] fold_r, op_a, op_b, prod;

      rns_fold #(.IN_W(K_W), .N(NI)) u_fold (
        .a(fold_in),
        .r(fold_r)
      );

      always_comb begin
        unique case (issue_op)
          OP_XY:    begin op_a = x_q[i][NI-1:0];  op_b = y_q[i][NI-1:0];                          end
          OP_GAMMA: begin op_a = xy_q[i][NI-1:0]; op_b = INV[i][NI-1:0];                          end
          OP_YSUM:  begin op_a = fold_r;          op_b = CM[int'(rnd) * NMUL + u][i][NI-1:0];     end
          OP_KP:    begin op_a = fold_r;          op_b = NEGP[i][NI-1:0];                         end
          default:  begin op_a = '0;              op_b = '0;                                      end
        endcase
      end

      rns_mul #(.N(NI), .PIPE(PIPE)) u_mul (
        .clk(clk),
        .a(op_a),
        .b(op_b),
        .r(prod)
      );

      assign mres[u][i] = res_t'(prod);
    end
  end

  // Step 3 accumulation and step 6 sums, one modular adder chain per channel.
  for (genvar i = 0; i < N; i++) begin : g_acc
    localparam int NI = NW[i];
    logic [NI-1:0] za_r, zn_r;

    assign ysum[0][i] = sum_q[i];
    for (genvar u = 0; u < NMUL; u++) begin : g_add
      logic [NI-1:0] s_r;
      rns_add #(.N(NI)) u_add (
        .a(ysum[u][i][NI-1:0]),
        .b(mres[u][i][NI-1:0]),
        .r(s_r)
      );
      assign ysum[u+1][i] = res_t'(s_r);
    end

    rns_add #(.N(NI)) u_add_a (
      .a(sum_q[i][NI-1:0]),
      .b(ATAB[alpha_q][i][NI-1:0]),
      .r(za_r)
    );
    rns_add #(.N(NI)) u_add_kp (
      .a(za_r),
      .b(kp_q[i][NI-1:0]),
      .r(zn_r)
    );
    assign z_next[i] = res_t'(zn_r);
  end

  // ---------------------------------------------------------------------
  // Control
  // ---------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_IDLE;
      after_drain <= ST_IDLE;
      rnd         <= '0;
      issue_op_q  <= OP_NONE;
      done        <= 1'b0;
      x_q         <= '0;
      y_q         <= '0;
      xy_q        <= '0;
      gamma_q     <= '0;
      sum_q       <= '0;
      kp_q        <= '0;
      z_q         <= '0;
      alpha_q     <= '0;
      k_q         <= '0;
    end else begin
      issue_op_q <= issue_op;
      done       <= 1'b0;

      // Write-back of the channel multipliers (PIPE cycles after issue).
      unique case (wb_op)
        OP_XY:    xy_q    <= mres[0];
        OP_GAMMA: gamma_q <= mres[0];
        OP_YSUM:  sum_q   <= ysum[NMUL];
        OP_KP:    kp_q    <= mres[0];
        default:  ;
      endcase

      unique case (state)
        ST_IDLE: begin
          if (start) begin
            x_q   <= x;
            y_q   <= y;
            sum_q <= '0;
            state <= ST_XY;
          end
        end
        ST_XY: begin
          if (PIPE) begin state <= ST_DRAIN; after_drain <= ST_GAMMA; end
          else            state <= ST_GAMMA;
        end
        ST_GAMMA: begin
          if (PIPE) begin state <= ST_DRAIN; after_drain <= ST_YSUM; end
          else            state <= ST_YSUM;
        end
        ST_YSUM: begin
          if (rnd == '0) begin
            alpha_q <= alpha_c;
            k_q     <= k_c;
          end
          if (int'(rnd) == R - 1) begin
            rnd   <= '0;
            state <= ST_KP;
          end else begin
            rnd <= rnd + 1'b1;
          end
        end
        ST_KP: begin
          if (PIPE) begin state <= ST_DRAIN; after_drain <= ST_FINAL; end
          else            state <= ST_FINAL;
        end
        ST_DRAIN: state <= after_drain;
        ST_FINAL: begin
          z_q   <= z_next;
          done  <= 1'b1;
          state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign busy  = (state != ST_IDLE);
  assign z     = z_q;
  assign alpha = alpha_q;
  assign k     = k_q;

  // alpha indexes a table of N rows; it stays below N for inputs whose
  // product is below (1 - Delta) * M.
  a_alpha_range: assert property (
    @(posedge clk)
    (state == ST_YSUM && rnd == '0) |-> (int'(alpha_c) < N)
  ) else $error("sor_modmul: alpha = %0d out of range, operands too large", alpha_c);

  // The configuration must split step 3 evenly over the RNS multipliers.
  if (N % NMUL != 0) begin : g_bad_nmul
    $error("sor_modmul: NMUL must divide N");
  end

endmodule
