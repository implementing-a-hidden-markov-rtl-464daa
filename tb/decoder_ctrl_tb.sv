// decoder_ctrl_tb: self-checking test of the frame sequencer.
//
// A host model offers observations with random idle gaps and holds each one
// until it is accepted; start pulses are inserted between utterances. Every
// cycle is checked against a cycle-accurate expectation: after acceptance in
// cycle a, HMMs 0..NUM_HMM-1 issue in cycles a+1..a+NUM_HMM with the accepted
// observation, frame_end is high exactly in cycle a+NUM_HMM+DRAIN+1, ready is
// low from a+1 up to that cycle, init follows start, and frame_idx counts
// frames from 0 after each start. It also counts host stalls (valid while not
// ready) and requires some.
module decoder_ctrl_tb;
  import viterbi_pkg::*;

  localparam int DRAIN = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, stalls = 0;

  logic       start, obs_valid, obs_ready, issue_valid, init, frame_end;
  obs_t       obs_data, issue_obs;
  hmm_idx_t   issue_hmm;
  logic [15:0] frame_idx;

  decoder_ctrl #(.DRAIN(DRAIN)) dut (.clk, .rst_n, .start, .obs_valid, .obs_ready, .obs_data,
    .issue_valid, .issue_hmm, .issue_obs, .init, .frame_end, .frame_idx);

  int since;      // cycles since acceptance, -1 when idle
  obs_t cur_obs;
  int exp_frame;

  initial begin
    start = 0; obs_valid = 0; obs_data = '0;
    since = -1; exp_frame = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      // ---- check outputs of this cycle (inputs already stable) ----
      checks += 5;
      if (obs_ready !== (since < 0 && !start)) begin failures++; $display("FAIL ready n=%0d", n); end
      if (init !== (since < 0 && start)) begin failures++; $display("FAIL init"); end
      if (issue_valid !== (since >= 1 && since <= NUM_HMM)) begin
        failures++; $display("FAIL issue_valid since=%0d", since);
      end
      if (issue_valid && (int'(issue_hmm) != since - 1 || issue_obs != cur_obs)) begin
        failures++; $display("FAIL issue data");
      end
      if (frame_end !== (since == NUM_HMM + DRAIN + 1)) begin
        failures++; $display("FAIL frame_end since=%0d", since);
      end
      checks++;
      if (int'(frame_idx) != exp_frame) begin failures++; $display("FAIL frame_idx"); end
      // ---- advance the reference over the coming clock edge ----
      @(posedge clk);
      if (since < 0 && start) exp_frame = 0;
      else if (since < 0 && obs_valid) begin since = 1; cur_obs = obs_data; end
      else if (since == NUM_HMM + DRAIN + 1) begin since = -1; exp_frame++; end
      else if (since >= 0) since++;
      if (obs_valid && !obs_ready && !start) stalls++;
      // ---- host drives new inputs ----
      #1;
      if (start) start = 0;
      else if (!obs_valid && since < 0 && $urandom_range(0, 40) == 0) start = 1;
      if (since == 1) obs_valid = 0;  // accepted at this edge
      if (!obs_valid && !start && $urandom_range(0, 2) == 0) begin
        obs_valid = 1; obs_data = obs_t'($urandom_range(0, 255));
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL host never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
