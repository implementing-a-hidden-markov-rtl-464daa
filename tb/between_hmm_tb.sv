// between_hmm_tb: self-checking test of the between-HMM entry-cost block.
//
// Loads random exit costs (some LOG_ZERO) for all HMMs, then runs frames in
// which each HMM's exit-state delta (some LOG_ZERO, some large enough that the
// sum underflows) is presented once, in order, with random gaps. After every
// input the running best (smallest exit delta + exit cost, first HMM on ties)
// and its HMM index are compared with a reference; clear must restart it.
module between_hmm_tb;
  import viterbi_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic     wr_en, clear, in_valid;
  hmm_idx_t wr_addr, in_hmm, best_hmm;
  cost_t    wr_data, in_exit, best_cost;

  between_hmm dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .clear, .in_valid, .in_hmm,
                   .in_exit, .best_cost, .best_hmm);

  int ecost [NUM_HMM];
  int ref_c, ref_h;

  task automatic check(input string what);
    checks++;
    if (int'(best_cost) != ref_c || (ref_c != int'(LOG_ZERO) && int'(best_hmm) != ref_h)) begin
      failures++;
      $display("FAIL %s: exp %0d/%0d got %0d/%0d", what, ref_c, ref_h, best_cost, best_hmm);
    end
  endtask

  initial begin
    wr_en = 0; clear = 0; in_valid = 0; wr_addr = '0; in_hmm = '0; wr_data = '0; in_exit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int h = 0; h < NUM_HMM; h++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = hmm_idx_t'(h);
      ecost[h] = ($urandom_range(0, 9) == 0) ? int'(LOG_ZERO) : int'($urandom_range(0, 5000));
      wr_data = cost_t'(ecost[h]);
    end
    @(negedge clk);
    wr_en = 0;
    for (int f = 0; f < 40; f++) begin
      clear = 1;
      @(negedge clk);
      clear = 0;
      ref_c = int'(LOG_ZERO); ref_h = 0;
      check("after clear");
      for (int h = 0; h < NUM_HMM; h++) begin
        int e, s;
        while ($urandom_range(0, 3) == 0) @(negedge clk);
        in_valid = 1; in_hmm = hmm_idx_t'(h);
        e = ($urandom_range(0, 7) == 0) ? int'(LOG_ZERO)
          : ($urandom_range(0, 7) == 0) ? int'($urandom_range(28000, 32766))
          : int'($urandom_range(0, 8000));
        in_exit = cost_t'(e);
        @(negedge clk);
        in_valid = 0;
        if (e != int'(LOG_ZERO) && ecost[h] != int'(LOG_ZERO)) begin
          s = e + ecost[h];
          if (s < int'(LOG_ZERO) && s < ref_c) begin ref_c = s; ref_h = h; end
        end
        check("running best");
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
