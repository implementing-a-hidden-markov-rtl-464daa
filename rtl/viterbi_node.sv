// viterbi_node: the processing element for one HMM state (one node of the
// state-time trellis).
//
// Per frame t it evaluates, in the log (cost) domain,
//   delta_t(j) = min_i [ delta_{t-1}(i) + a_ij ] + b_j(O_t)
//   psi_t(j)   = argmin_i [ delta_{t-1}(i) + a_ij ]
// over the three states i of its own HMM; the entry node (ENTRY = 1) also
// considers the between-HMM entry cost, which stands for arriving from the
// best exit state of any HMM and is coded as predecessor PSI_ENTRY. All the
// arithmetic is addition and comparison, as the log domain allows.
//
// Any LOG_ZERO operand makes its candidate ACC_INF (probability zero); the
// result is ACC_INF when every candidate is, or when b is LOG_ZERO. Ties go to
// the lowest predecessor index.
//
// Timing: two register stages. Stage 1 adds and selects; stage 2 adds the
// observation cost. out_valid, delta and psi appear 2 cycles after in_valid.
// The equations are the standard Viterbi recursion; the cost encoding, tie
// rule and two-stage split are this design's choices.
module viterbi_node
  import viterbi_pkg::*;
#(
  parameter bit ENTRY = 1'b0  // 1: this is the HMM's entry state
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  cost_vec_t prev_delta,  // delta_{t-1}(i), i = 0..2
  input  cost_vec_t trans,       // a_ij into this state, i = 0..2
  input  cost_t     between,     // entry cost from other HMMs
  input  cost_t     obs,         // b_j(O_t)
  output logic      out_valid,
  output acc_t      delta,
  output psi_t      psi
);

  // Sum of two costs; probability zero if either operand is.
  function automatic acc_t add_cost(cost_t x, cost_t y);
    if (x == LOG_ZERO || y == LOG_ZERO) return ACC_INF;
    return acc_t'(x) + acc_t'(y);
  endfunction

  acc_t cand [NUM_STATES+1];
  acc_t best_c;
  psi_t best_p;

  always_comb begin
    for (int i = 0; i < NUM_STATES; i++) cand[i] = add_cost(prev_delta[i], trans[i]);
    cand[NUM_STATES] = (ENTRY && between != LOG_ZERO) ? acc_t'(between) : ACC_INF;
    best_c = cand[0];
    best_p = PSI_S0;
    for (int i = 1; i <= NUM_STATES; i++) begin
      if (cand[i] < best_c) begin
        best_c = cand[i];
        best_p = psi_t'(i);
      end
    end
  end

  // Stage 1: add-compare-select result.
  logic  s1_valid;
  acc_t  s1_cost;
  psi_t  s1_psi;
  cost_t s1_obs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_cost   <= ACC_INF;
      s1_psi    <= PSI_S0;
      s1_obs    <= LOG_ZERO;
      out_valid <= 1'b0;
      delta     <= ACC_INF;
      psi       <= PSI_S0;
    end else begin
      s1_valid <= in_valid;
      s1_cost  <= best_c;
      s1_psi   <= best_p;
      s1_obs   <= obs;
      // Stage 2: add the observation cost.
      out_valid <= s1_valid;
      psi       <= s1_psi;
      if (s1_cost == ACC_INF || s1_obs == LOG_ZERO) delta <= ACC_INF;
      else                                          delta <= s1_cost + acc_t'(s1_obs);
    end
  end

endmodule
