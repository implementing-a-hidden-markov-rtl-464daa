// delta_delay: frame store that feeds the scaled deltas back to the nodes.
//
// Every delta of frame t depends only on deltas of frame t-1, so the store has
// two banks: the scaler writes frame t into one while the HMM Block reads frame
// t-1 from the other, and frame_end swaps them. The block also holds the
// between-HMM entry cost for the frame being computed, taken from between_hmm
// at frame_end.
//
// Initialisation: after init, and until the first frame_end, every stored
// delta reads as LOG_ZERO and the entry cost as 0. The first frame therefore
// yields delta_0 = b(O_0) in state 0 of every HMM (all models start in their
// first state) and probability zero in the other states.
//
// Timing: rd_delta and rd_valid appear LAT cycles after rd_en/rd_hmm (a
// registered read plus LAT-1 stages, LAT >= 1), matching the off-chip RAM so
// that deltas and observation costs reach the nodes in the same cycle.
// rd_between is steady for the whole frame. The two-bank organisation and the
// LOG_ZERO/0 start values are this design's choices.
module delta_delay
  import viterbi_pkg::*;
#(
  parameter int LAT = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      init,
  input  logic      frame_end,
  input  cost_t     between_in,
  input  logic      wr_en,
  input  hmm_idx_t  wr_hmm,
  input  cost_vec_t wr_delta,
  input  logic      rd_en,
  input  hmm_idx_t  rd_hmm,
  output logic      rd_valid,
  output cost_vec_t rd_delta,
  output cost_t     rd_between
);

  cost_vec_t bank0 [NUM_HMM];
  cost_vec_t bank1 [NUM_HMM];
  logic      wr_sel;     // bank written this frame; the other is read
  logic      first;      // no previous frame yet
  cost_vec_t rd_q;
  logic      rd_en_q;

  always_ff @(posedge clk) begin
    if (wr_en && !wr_sel) bank0[wr_hmm] <= wr_delta;
    if (wr_en &&  wr_sel) bank1[wr_hmm] <= wr_delta;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_sel     <= 1'b0;
      first      <= 1'b1;
      rd_between <= '0;
      rd_q       <= '{default: LOG_ZERO};
      rd_en_q    <= 1'b0;
    end else begin
      rd_en_q <= rd_en;
      if (first)        rd_q <= '{default: LOG_ZERO};
      else if (wr_sel)  rd_q <= bank0[rd_hmm];
      else              rd_q <= bank1[rd_hmm];
      if (init) begin
        first      <= 1'b1;
        rd_between <= '0;
      end else if (frame_end) begin
        first      <= 1'b0;
        wr_sel     <= !wr_sel;
        rd_between <= between_in;
      end
    end
  end

  pipe_delay #(.WIDTH($bits(cost_vec_t) + 1), .DEPTH(LAT-1)) u_align (
    .clk, .rst_n, .d({rd_en_q, rd_q}), .q({rd_valid, rd_delta})
  );

  initial assert (LAT >= 1) else $error("delta_delay: LAT must be at least 1");

endmodule
