// hmm_block: the processing elements that handle one whole HMM per cycle.
//
// Three viterbi_node instances, one per state, share the HMM's previous-frame
// deltas; each takes its own column of the transition matrix and its own
// observation cost. Only state 0, the entry state, considers the between-HMM
// entry cost. The HMM index travels alongside as a tag so that later blocks
// know where the results belong.
//
// Timing: fully pipelined, one HMM accepted per cycle, results 2 cycles after
// in_valid. Handling one HMM at a time (rather than all 49 in parallel) is the
// organisation the decoder is built around; the issue rate is this design's
// choice.
module hmm_block
  import viterbi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  hmm_idx_t   in_hmm,
  input  cost_vec_t  prev_delta,
  input  cost_t      between,
  input  trans_mat_t trans,      // [j][i]
  input  cost_vec_t  obs,        // b_j(O_t), j = 0..2
  output logic       out_valid,
  output hmm_idx_t   out_hmm,
  output acc_vec_t   delta,
  output psi_vec_t   psi
);

  logic [NUM_STATES-1:0] node_valid;

  for (genvar j = 0; j < NUM_STATES; j++) begin : g_node
    viterbi_node #(.ENTRY(j == 0)) u_node (
      .clk, .rst_n,
      .in_valid  (in_valid),
      .prev_delta(prev_delta),
      .trans     (trans[j]),
      .between   (between),
      .obs       (obs[j]),
      .out_valid (node_valid[j]),
      .delta     (delta[j]),
      .psi       (psi[j])
    );
  end

  assign out_valid = node_valid[0];

  pipe_delay #(.WIDTH(HMM_W), .DEPTH(2)) u_tag (
    .clk, .rst_n, .d(in_hmm), .q(out_hmm)
  );

  // The three nodes run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n) node_valid == '0 || node_valid == '1);

endmodule
