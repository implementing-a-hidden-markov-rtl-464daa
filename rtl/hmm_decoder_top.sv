// hmm_decoder_top: Viterbi decoder for a discrete-observation HMM speech
// recogniser (49 monophone models of 3 states, 8-bit observations).
//
// For every observation the decoder computes, for all 147 HMM states, the
// best-path cost delta_t(j) and the best predecessor psi_t(j). The predecessor
// records go out to off-chip RAM for the host to backtrack; the deltas stay on
// chip and are fed back for the next frame.
//
// Dataflow (one HMM per cycle, pipelined):
//   decoder_ctrl issues HMM m  ->  three reads of latency RAM_LAT in parallel:
//     off-chip RAM word {m, O_t} (the 3 states' observation costs),
//     trans_mem (m's 3x3 transition costs), delta_delay (m's deltas at t-1)
//   -> hmm_block (3 nodes, 2 cycles) -> scaler (1 cycle)
//   -> delta_delay write, between_hmm (exit state), predecessor write port.
// At the end of the frame the scaler takes its new offset, between_hmm hands
// the shared entry cost to delta_delay, and the frame is reported on
// frame_done with the best exit HMM and its cost.
//
// Host interfaces: cfg_* loads transition costs (cfg_sel = 0, entry
// [cfg_hmm][cfg_from -> cfg_to]) and exit costs (cfg_sel = 1, entry
// [cfg_hmm]); start begins an utterance; obs_* is the observation handshake.
// Off-chip RAM: obs_ram_* is a read port returning data RAM_LAT cycles after
// obs_ram_re; psi_* is a write port, one 6-bit record (psi of states 2,1,0)
// per HMM per frame at consecutive addresses from 0 after start.
//
// Timing: frame_done is high NUM_HMM + RAM_LAT + 4 cycles after the cycle in
// which the observation was accepted (55 at the defaults), and the next
// observation can be accepted one cycle later, so one observation takes 56
// cycles when the host keeps up. RAM_LAT and the RAM word
// layout are this design's choices.
module hmm_decoder_top
  import viterbi_pkg::*;
#(
  parameter int RAM_LAT = 2,
  parameter int PSI_AW  = 20,
  parameter int FRAME_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // model loading
  input  logic                    cfg_we,
  input  logic                    cfg_sel,
  input  hmm_idx_t                cfg_hmm,
  input  logic [1:0]              cfg_from,
  input  logic [1:0]              cfg_to,
  input  cost_t                   cfg_data,
  // host observation port
  input  logic                    start,
  input  logic                    obs_valid,
  output logic                    obs_ready,
  input  obs_t                    obs_data,
  // off-chip RAM: observation costs
  output logic                    obs_ram_re,
  output logic [HMM_W+OBS_W-1:0]  obs_ram_addr,
  input  cost_vec_t               obs_ram_rdata,
  // off-chip RAM: predecessor records
  output logic                    psi_we,
  output logic [PSI_AW-1:0]       psi_addr,
  output psi_vec_t                psi_wdata,
  output logic [NUM_STATES-1:0]   psi_discard,
  // frame report
  output logic                    frame_done,
  output logic [FRAME_W-1:0]      frame_idx,
  output hmm_idx_t                best_exit_hmm,
  output cost_t                   best_exit_cost
);

  localparam int DRAIN = RAM_LAT + 3;

  // Controller
  logic     issue_valid, init, frame_end;
  hmm_idx_t issue_hmm;
  obs_t     issue_obs;

  decoder_ctrl #(.DRAIN(DRAIN), .FRAME_W(FRAME_W)) u_ctrl (
    .clk, .rst_n, .start, .obs_valid, .obs_ready, .obs_data,
    .issue_valid, .issue_hmm, .issue_obs, .init, .frame_end, .frame_idx
  );

  assign obs_ram_re   = issue_valid;
  assign obs_ram_addr = {issue_hmm, issue_obs};

  // Operand fetch, all aligned to RAM_LAT
  trans_mat_t trans;
  trans_mem #(.LAT(RAM_LAT)) u_trans (
    .clk, .rst_n,
    .wr_en(cfg_we && !cfg_sel), .wr_hmm(cfg_hmm), .wr_from(cfg_from), .wr_to(cfg_to),
    .wr_data(cfg_data),
    .rd_hmm(issue_hmm), .rd_data(trans)
  );

  logic      op_valid;
  cost_vec_t prev_delta;
  cost_t     between;
  hmm_idx_t  op_hmm;

  // Scaled results (written back)
  logic                  sc_valid;
  cost_vec_t             sc_delta;
  logic [NUM_STATES-1:0] sc_discard;
  hmm_idx_t              sc_hmm;
  psi_vec_t              sc_psi;

  cost_t    bh_cost;
  hmm_idx_t bh_hmm;

  delta_delay #(.LAT(RAM_LAT)) u_delay (
    .clk, .rst_n, .init, .frame_end,
    .between_in(bh_cost),
    .wr_en(sc_valid), .wr_hmm(sc_hmm), .wr_delta(sc_delta),
    .rd_en(issue_valid), .rd_hmm(issue_hmm),
    .rd_valid(op_valid), .rd_delta(prev_delta), .rd_between(between)
  );

  pipe_delay #(.WIDTH(HMM_W), .DEPTH(RAM_LAT)) u_op_tag (
    .clk, .rst_n, .d(issue_hmm), .q(op_hmm)
  );

  // HMM Block
  logic     hb_valid;
  hmm_idx_t hb_hmm;
  acc_vec_t hb_delta;
  psi_vec_t hb_psi;

  hmm_block u_hmm (
    .clk, .rst_n,
    .in_valid(op_valid), .in_hmm(op_hmm), .prev_delta, .between, .trans,
    .obs(obs_ram_rdata),
    .out_valid(hb_valid), .out_hmm(hb_hmm), .delta(hb_delta), .psi(hb_psi)
  );

  // Scaler
  scaler u_scaler (
    .clk, .rst_n, .init, .frame_end,
    .in_valid(hb_valid), .in_delta(hb_delta),
    .out_valid(sc_valid), .out_delta(sc_delta), .out_discard(sc_discard)
  );

  pipe_delay #(.WIDTH(HMM_W + $bits(psi_vec_t)), .DEPTH(1)) u_sc_tag (
    .clk, .rst_n, .d({hb_hmm, hb_psi}), .q({sc_hmm, sc_psi})
  );

  // Between-HMM entry cost
  between_hmm u_between (
    .clk, .rst_n,
    .wr_en(cfg_we && cfg_sel), .wr_addr(cfg_hmm), .wr_data(cfg_data),
    .clear(frame_end || init),
    .in_valid(sc_valid), .in_hmm(sc_hmm), .in_exit(sc_delta[NUM_STATES-1]),
    .best_cost(bh_cost), .best_hmm(bh_hmm)
  );

  // Predecessor records to off-chip RAM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          psi_addr <= '0;
    else if (init)       psi_addr <= '0;
    else if (sc_valid)   psi_addr <= psi_addr + 1'b1;
  end

  assign psi_we      = sc_valid;
  assign psi_wdata   = sc_psi;
  assign psi_discard = sc_discard;

  // Frame report
  assign frame_done     = frame_end;
  assign best_exit_hmm  = bh_hmm;
  assign best_exit_cost = bh_cost;

  // The decoder itself never writes back outside a frame.
  assert property (@(posedge clk) disable iff (!rst_n) frame_end |-> !sc_valid && !hb_valid);

endmodule
