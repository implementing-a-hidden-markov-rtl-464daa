// decoder_ctrl: sequences the decoding of one observation (one frame).
//
// The host offers 8-bit quantised observations on a valid/ready handshake.
// When one is accepted the controller issues the HMMs one per cycle, index 0
// to NUM_HMM-1; each issue starts the off-chip read of that HMM's observation
// costs and the on-chip reads of its transition matrix and previous deltas.
// It then waits DRAIN cycles for the pipeline to empty, pulses frame_end (the
// scaler, between-HMM block and delta store close the frame) and becomes ready
// again. A start pulse, taken only between frames, begins a new utterance:
// it pulses init and resets the frame index.
//
// Timing: with the observation accepted in cycle a, HMMs issue in cycles
// a+1 .. a+NUM_HMM, frame_end is high in cycle a+NUM_HMM+DRAIN+1, and obs_ready
// returns the cycle after. DRAIN must cover the read latency plus the node and
// scaler stages (RAM_LAT + 3 in this decoder). The handshake and the state
// sequence are this design's choices.
module decoder_ctrl
  import viterbi_pkg::*;
#(
  parameter int DRAIN   = 5,
  parameter int FRAME_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               obs_valid,
  output logic               obs_ready,
  input  obs_t               obs_data,
  output logic               issue_valid,
  output hmm_idx_t           issue_hmm,
  output obs_t               issue_obs,
  output logic               init,
  output logic               frame_end,
  output logic [FRAME_W-1:0] frame_idx
);

  typedef enum logic [1:0] {IDLE, ISSUE, WAIT, CLOSE} state_t;

  state_t   state;
  hmm_idx_t hmm_cnt;
  logic [$clog2(DRAIN+1)-1:0] drain_cnt;

  assign obs_ready   = (state == IDLE) && !start;
  assign issue_valid = (state == ISSUE);
  assign issue_hmm   = hmm_cnt;
  assign frame_end   = (state == CLOSE);
  assign init        = (state == IDLE) && start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      hmm_cnt   <= '0;
      drain_cnt <= '0;
      issue_obs <= '0;
      frame_idx <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          if (start) begin
            frame_idx <= '0;
          end else if (obs_valid) begin
            issue_obs <= obs_data;
            hmm_cnt   <= '0;
            state     <= ISSUE;
          end
        end
        ISSUE: begin
          if (hmm_cnt == hmm_idx_t'(NUM_HMM - 1)) begin
            drain_cnt <= '0;
            state     <= WAIT;
          end else begin
            hmm_cnt <= hmm_cnt + 1'b1;
          end
        end
        WAIT: begin
          if (drain_cnt == ($clog2(DRAIN+1))'(DRAIN - 1)) state <= CLOSE;
          else                                           drain_cnt <= drain_cnt + 1'b1;
        end
        CLOSE: begin
          frame_idx <= frame_idx + 1'b1;
          state     <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Host handshake: data must be held while valid waits for ready.
  assert property (@(posedge clk) disable iff (!rst_n)
                   obs_valid && !obs_ready && !start |=> obs_valid && $stable(obs_data));

  initial assert (DRAIN >= 1) else $error("decoder_ctrl: DRAIN must be at least 1");

endmodule
