// trans_mem: on-chip store of the transition costs a_ij of every HMM.
//
// Each HMM has a full 3x3 matrix of 15-bit costs (49 x 9 x 15 bits, about
// 830 bytes), small enough for on-chip block RAM. The host writes one entry at
// a time (HMM, from-state i, to-state j); the decoder reads a whole matrix per
// cycle so that the three nodes of an HMM get all their costs at once. The
// array is kept as nine narrow memories, one per (j, i) pair, so each write
// touches one of them.
//
// Timing: a registered read, then LAT-1 further register stages, so rd_data
// belongs to the rd_hmm presented LAT cycles earlier (LAT >= 1). LAT is set to
// the off-chip RAM read latency so that transition and observation costs meet
// at the nodes. The storage split and the latency are this design's choices.
module trans_mem
  import viterbi_pkg::*;
#(
  parameter int LAT = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  hmm_idx_t   wr_hmm,
  input  logic [1:0] wr_from,   // i
  input  logic [1:0] wr_to,     // j
  input  cost_t      wr_data,
  input  hmm_idx_t   rd_hmm,
  output trans_mat_t rd_data    // [j][i]
);

  trans_mat_t rd_q;

  for (genvar j = 0; j < NUM_STATES; j++) begin : g_to
    for (genvar i = 0; i < NUM_STATES; i++) begin : g_from
      cost_t mem [NUM_HMM];
      always_ff @(posedge clk) begin
        if (wr_en && wr_to == 2'(j) && wr_from == 2'(i)) mem[wr_hmm] <= wr_data;
        rd_q[j][i] <= mem[rd_hmm];
      end
    end
  end

  pipe_delay #(.WIDTH($bits(trans_mat_t)), .DEPTH(LAT-1)) u_align (
    .clk, .rst_n, .d(rd_q), .q(rd_data)
  );

  initial assert (LAT >= 1) else $error("trans_mem: LAT must be at least 1");

endmodule
