// viterbi_pkg: types and constants shared by the discrete-HMM Viterbi decoder.
//
// The decoder works in the log domain with costs: a cost is the negative
// logarithm of a probability, scaled to an unsigned 15-bit integer, so that
// multiplying probabilities becomes adding costs and taking the most likely
// path becomes taking the smallest cost. The all-ones cost LOG_ZERO stands for
// probability zero and absorbs any sum it enters.
//
// Sizes follow the recogniser's model: 49 monophone HMMs of 3 states each,
// 8-bit quantised observations and 15-bit look-up table entries. The cost
// convention, the LOG_ZERO code and the 2-bit predecessor code are this
// design's own choices.
package viterbi_pkg;

  localparam int NUM_HMM    = 49;  // monophone models
  localparam int NUM_STATES = 3;   // emitting states per model
  localparam int COST_W     = 15;  // width of every stored cost
  localparam int ACC_W      = 17;  // width of an unscaled node result
  localparam int OBS_W      = 8;   // quantised observation
  localparam int HMM_W      = $clog2(NUM_HMM);
  localparam int OBS_VALS   = 1 << OBS_W;  // entries of each observation table

  typedef logic [COST_W-1:0] cost_t;
  typedef logic [ACC_W-1:0]  acc_t;
  typedef logic [HMM_W-1:0]  hmm_idx_t;
  typedef logic [OBS_W-1:0]  obs_t;

  localparam cost_t LOG_ZERO = '1;  // probability zero
  localparam acc_t  ACC_INF  = '1;  // unscaled "probability zero"

  // Best predecessor of a state: one of the HMM's own states, or entry from
  // the best exit of any HMM in the previous frame.
  typedef enum logic [1:0] {
    PSI_S0    = 2'd0,
    PSI_S1    = 2'd1,
    PSI_S2    = 2'd2,
    PSI_ENTRY = 2'd3
  } psi_t;

  // One HMM's worth of values: index = state.
  typedef cost_t [NUM_STATES-1:0]                  cost_vec_t;
  typedef acc_t  [NUM_STATES-1:0]                  acc_vec_t;
  typedef psi_t  [NUM_STATES-1:0]                  psi_vec_t;
  // Transition matrix of one HMM: [to state j][from state i].
  typedef cost_t [NUM_STATES-1:0][NUM_STATES-1:0]  trans_mat_t;

endpackage
