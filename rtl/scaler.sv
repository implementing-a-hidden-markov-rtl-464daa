// scaler: keeps the deltas within 15 bits and discards underflowed values.
//
// Costs only grow from frame to frame, so without scaling they would soon
// exceed any fixed width. At the end of every frame the scaler records the
// smallest scaled delta it produced; during the next frame it subtracts that
// offset from every incoming delta. Because every delta of a frame is at least
// the smallest delta of the frame before (costs are never negative), results
// are never negative, and the best state of each frame stays near zero.
// A result that does not fit below LOG_ZERO, or an input that is already
// ACC_INF, is a probability that has underflowed: it is replaced by LOG_ZERO
// and flagged in out_discard.
//
// Interface: init (start of an utterance) clears the offset; frame_end loads
// the frame minimum into the offset and restarts the minimum search. One HMM
// (three deltas) per cycle; outputs are registered, 1 cycle after in_valid.
// The subtract-the-previous-minimum method is this design's choice.
module scaler
  import viterbi_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  init,
  input  logic                  frame_end,
  input  logic                  in_valid,
  input  acc_vec_t              in_delta,
  output logic                  out_valid,
  output cost_vec_t             out_delta,
  output logic [NUM_STATES-1:0] out_discard
);

  cost_t offset;     // subtracted during this frame
  cost_t frame_min;  // smallest result so far in this frame

  cost_vec_t             scaled;
  logic [NUM_STATES-1:0] disc;
  cost_t                 cyc_min;

  always_comb begin
    cyc_min = frame_min;
    for (int j = 0; j < NUM_STATES; j++) begin
      acc_t diff;
      diff = (in_delta[j] > acc_t'(offset)) ? in_delta[j] - acc_t'(offset) : '0;
      if (in_delta[j] == ACC_INF || diff >= acc_t'(LOG_ZERO)) begin
        scaled[j] = LOG_ZERO;
        disc[j]   = 1'b1;
      end else begin
        scaled[j] = cost_t'(diff);
        disc[j]   = 1'b0;
      end
      if (in_valid && scaled[j] < cyc_min) cyc_min = scaled[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      offset      <= '0;
      frame_min   <= LOG_ZERO;
      out_valid   <= 1'b0;
      out_delta   <= '{default: LOG_ZERO};
      out_discard <= '0;
    end else begin
      out_valid   <= in_valid;
      out_delta   <= scaled;
      out_discard <= in_valid ? disc : '0;
      if (init) begin
        offset    <= '0;
        frame_min <= LOG_ZERO;
      end else if (frame_end) begin
        // If every path has died, keep the scale at zero.
        offset    <= (frame_min == LOG_ZERO) ? '0 : frame_min;
        frame_min <= LOG_ZERO;
      end else begin
        frame_min <= cyc_min;
      end
    end
  end

  // The controller only ends a frame once the pipeline is empty.
  assert property (@(posedge clk) disable iff (!rst_n) frame_end |-> !in_valid);

endmodule
