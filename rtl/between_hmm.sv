// between_hmm: computes the one entry cost shared by every HMM.
//
// With no language model, moving from the exit state of one HMM into the entry
// state of another costs the same whichever HMM is entered. That cost for the
// next frame is the best, over all HMMs m, of
//   delta_t(m, last state) + exit_cost(m)
// where exit_cost(m) is the cost of leaving HMM m, held in a small 49-entry
// table (distributed RAM, asynchronous read) written by the host. The block
// also keeps the index of the HMM that gave the best value, which the host
// needs to backtrack across model boundaries.
//
// Timing: one exit delta per cycle; best_cost/best_hmm show the running result
// from the cycle after each in_valid. clear restarts the search (LOG_ZERO, 0).
// The formula for the shared value and the reporting of best_hmm are this
// design's reading of the recogniser's description.
module between_hmm
  import viterbi_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     wr_en,
  input  hmm_idx_t wr_addr,
  input  cost_t    wr_data,
  input  logic     clear,
  input  logic     in_valid,
  input  hmm_idx_t in_hmm,
  input  cost_t    in_exit,
  output cost_t    best_cost,
  output hmm_idx_t best_hmm
);

  cost_t exit_cost [NUM_HMM];

  always_ff @(posedge clk) begin
    if (wr_en) exit_cost[wr_addr] <= wr_data;
  end

  cost_t cand;
  always_comb begin
    logic [COST_W:0] sum;
    sum = {1'b0, in_exit} + {1'b0, exit_cost[in_hmm]};
    if (in_exit == LOG_ZERO || exit_cost[in_hmm] == LOG_ZERO || sum >= (COST_W+1)'(LOG_ZERO))
      cand = LOG_ZERO;  // underflow: no usable exit from this HMM
    else
      cand = cost_t'(sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_cost <= LOG_ZERO;
      best_hmm  <= '0;
    end else if (clear) begin
      best_cost <= LOG_ZERO;
      best_hmm  <= '0;
    end else if (in_valid && cand < best_cost) begin
      best_cost <= cand;
      best_hmm  <= in_hmm;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> in_hmm < hmm_idx_t'(NUM_HMM));

endmodule
