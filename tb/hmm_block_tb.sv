// hmm_block_tb: self-checking test of the three-node HMM Block.
//
// Streams random HMMs (previous deltas, 3x3 transition matrix, observation
// costs, between-HMM cost, index tag) with random gaps and checks, 2 cycles
// later, the tag, the three unscaled deltas and the three predecessor codes
// against a reference computed here. Only state 0 may choose the between-HMM
// entry; states 1 and 2 use column j of the matrix.
module hmm_block_tb;
  import viterbi_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int entry_seen = 0;

  logic       in_valid, out_valid;
  hmm_idx_t   in_hmm, out_hmm;
  cost_vec_t  prev_delta, obs;
  cost_t      between;
  trans_mat_t trans;
  acc_vec_t   delta;
  psi_vec_t   psi;

  hmm_block dut (.clk, .rst_n, .in_valid, .in_hmm, .prev_delta, .between, .trans, .obs,
                 .out_valid, .out_hmm, .delta, .psi);

  function automatic cost_t rnd_cost();
    int r;
    r = int'($urandom_range(0, 9));
    if (r == 0) return LOG_ZERO;
    return cost_t'($urandom_range(0, 20000));
  endfunction

  typedef struct { logic v; int h; int d[3]; int p[3]; } exp_t;
  exp_t e0, e1;

  task automatic reference(output exp_t e);
    for (int j = 0; j < 3; j++) begin
      int best, bp;
      best = -1; bp = 0;
      for (int i = 0; i < 3; i++) begin
        if (prev_delta[i] != LOG_ZERO && trans[j][i] != LOG_ZERO) begin
          int c;
          c = int'(prev_delta[i]) + int'(trans[j][i]);
          if (best < 0 || c < best) begin best = c; bp = i; end
        end
      end
      if (j == 0 && between != LOG_ZERO && (best < 0 || int'(between) < best)) begin
        best = int'(between); bp = 3;
      end
      e.d[j] = (best < 0 || obs[j] == LOG_ZERO) ? -1 : best + int'(obs[j]);
      e.p[j] = bp;
    end
  endtask

  initial begin
    in_valid = 0; in_hmm = '0; prev_delta = '0; obs = '0; between = '0; trans = '0;
    e0.v = 0; e1.v = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (out_valid !== e1.v) begin failures++; $display("FAIL valid timing n=%0d", n); end
      if (e1.v) begin
        checks++;
        if (int'(out_hmm) != e1.h) begin failures++; $display("FAIL tag"); end
        for (int j = 0; j < 3; j++) begin
          int g;
          g = (delta[j] == ACC_INF) ? -1 : int'(delta[j]);
          checks++;
          if (g != e1.d[j] || (g >= 0 && int'(psi[j]) != e1.p[j])) begin
            failures++;
            $display("FAIL state %0d: exp %0d/%0d got %0d/%0d", j, e1.d[j], e1.p[j], g, psi[j]);
          end
          if (g >= 0 && psi[j] == PSI_ENTRY) entry_seen++;
        end
      end
      e1 = e0;
      in_valid = ($urandom_range(0, 5) != 0);
      in_hmm = hmm_idx_t'($urandom_range(0, NUM_HMM-1));
      for (int i = 0; i < 3; i++) begin prev_delta[i] = rnd_cost(); obs[i] = rnd_cost(); end
      for (int j = 0; j < 3; j++) for (int i = 0; i < 3; i++) trans[j][i] = rnd_cost();
      between = rnd_cost();
      reference(e0);
      e0.v = in_valid; e0.h = int'(in_hmm);
    end
    checks++;
    if (entry_seen == 0) begin failures++; $display("FAIL entry path never taken"); end
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
