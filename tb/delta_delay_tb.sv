// delta_delay_tb: self-checking test of the two-bank delta store.
//
// Each frame it reads every HMM in a random order while writing new random
// deltas for every HMM in another order, then pulses frame_end with a random
// between-HMM value. Reads must return, LAT cycles later, the deltas written
// in the previous frame and that frame's between value; in the first frame
// after init they must return LOG_ZERO and 0. Re-initialisation is tested by
// running three utterances.
module delta_delay_tb;
  import viterbi_pkg::*;

  localparam int LAT = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic      init, frame_end, wr_en, rd_en, rd_valid;
  cost_t     between_in, rd_between;
  hmm_idx_t  wr_hmm, rd_hmm;
  cost_vec_t wr_delta, rd_delta;

  delta_delay #(.LAT(LAT)) dut (.clk, .rst_n, .init, .frame_end, .between_in, .wr_en, .wr_hmm,
    .wr_delta, .rd_en, .rd_hmm, .rd_valid, .rd_delta, .rd_between);

  cost_vec_t prev [NUM_HMM];
  cost_vec_t cur [NUM_HMM];
  int prev_between;
  bit first;
  int rd_q [$];      // expected HMM of each outstanding read
  bit vpipe [LAT+1];

  initial begin
    init = 0; frame_end = 0; wr_en = 0; rd_en = 0; between_in = '0; wr_hmm = '0; rd_hmm = '0;
    wr_delta = '0;
    for (int k = 0; k <= LAT; k++) vpipe[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int u = 0; u < 3; u++) begin
      @(negedge clk);
      init = 1;
      @(negedge clk);
      init = 0;
      first = 1; prev_between = 0;
      for (int f = 0; f < 6; f++) begin
        int rorder [NUM_HMM];
        int worder [NUM_HMM];
        for (int h = 0; h < NUM_HMM; h++) begin rorder[h] = h; worder[h] = h; end
        rorder.shuffle(); worder.shuffle();
        for (int n = 0; n < NUM_HMM + LAT + 2; n++) begin
          @(negedge clk);
          // check the output of the cycle that just ended
          checks++;
          if (rd_valid !== vpipe[LAT-1]) begin failures++; $display("FAIL rd_valid timing"); end
          if (vpipe[LAT-1]) begin
            int h;
            h = rd_q.pop_front();
            checks++;
            if (first ? (rd_delta != '{default: LOG_ZERO}) : (rd_delta != prev[h])) begin
              failures++; $display("FAIL read hmm %0d frame %0d", h, f);
            end
          end
          checks++;
          if (int'(rd_between) != prev_between) begin failures++; $display("FAIL between"); end
          for (int k = LAT; k > 0; k--) vpipe[k] = vpipe[k-1];
          rd_en = (n < NUM_HMM);
          wr_en = (n < NUM_HMM);
          if (rd_en) begin rd_hmm = hmm_idx_t'(rorder[n]); rd_q.push_back(rorder[n]); end
          if (wr_en) begin
            wr_hmm = hmm_idx_t'(worder[n]);
            for (int j = 0; j < 3; j++) wr_delta[j] = cost_t'($urandom_range(0, 32767));
            cur[worder[n]] = wr_delta;
          end
          vpipe[0] = rd_en;
        end
        @(negedge clk);
        rd_en = 0; wr_en = 0; vpipe[0] = 0;
        frame_end = 1;
        between_in = cost_t'($urandom_range(0, 32767));
        @(negedge clk);
        frame_end = 0;
        prev_between = int'(between_in);
        prev = cur;
        first = 0;
      end
    end
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
