// trans_mem_tb: self-checking test of the transition-cost store.
//
// Loads every entry (HMM, from, to) with a distinct random cost through the
// write port, then reads random HMMs back-to-back, rewriting random entries
// between reads, and checks every returned matrix against a copy kept here,
// LAT cycles after the read (LAT = 2 and LAT = 3 instances).
module trans_mem_tb;
  import viterbi_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       wr_en;
  hmm_idx_t   wr_hmm, rd_hmm;
  logic [1:0] wr_from, wr_to;
  cost_t      wr_data;
  trans_mat_t q2, q3;

  trans_mem #(.LAT(2)) dut2 (.clk, .rst_n, .wr_en, .wr_hmm, .wr_from, .wr_to, .wr_data,
                             .rd_hmm, .rd_data(q2));
  trans_mem #(.LAT(3)) dut3 (.clk, .rst_n, .wr_en, .wr_hmm, .wr_from, .wr_to, .wr_data,
                             .rd_hmm, .rd_data(q3));

  cost_t model [NUM_HMM][3][3];  // [hmm][j][i]
  trans_mat_t expq [4];

  task automatic write(input int h, input int i, input int j, input cost_t v);
    @(negedge clk);
    wr_en = 1; wr_hmm = hmm_idx_t'(h); wr_from = 2'(i); wr_to = 2'(j); wr_data = v;
    @(negedge clk);
    wr_en = 0;
    model[h][j][i] = v;
  endtask

  initial begin
    wr_en = 0; wr_hmm = '0; wr_from = '0; wr_to = '0; wr_data = '0; rd_hmm = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int h = 0; h < NUM_HMM; h++)
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          write(h, i, j, cost_t'($urandom_range(0, 32767)));
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n >= 3) begin
        checks += 2;
        if (q2 !== expq[1]) begin failures++; $display("FAIL LAT2 read n=%0d", n); end
        if (q3 !== expq[2]) begin failures++; $display("FAIL LAT3 read n=%0d", n); end
      end
      expq[3] = expq[2]; expq[2] = expq[1]; expq[1] = expq[0];
      rd_hmm = hmm_idx_t'($urandom_range(0, NUM_HMM-1));
      for (int j = 0; j < 3; j++)
        for (int i = 0; i < 3; i++)
          expq[0][j][i] = model[rd_hmm][j][i];
      // occasional rewrite: written in this cycle, visible from the next read
      wr_en = ($urandom_range(0, 9) == 0);
      if (wr_en) begin
        int h, i, j;
        h = int'($urandom_range(0, NUM_HMM-1)); i = int'($urandom_range(0, 2));
        j = int'($urandom_range(0, 2));
        while (h == int'(rd_hmm)) h = int'($urandom_range(0, NUM_HMM-1));
        wr_hmm = hmm_idx_t'(h); wr_from = 2'(i); wr_to = 2'(j);
        wr_data = cost_t'($urandom_range(0, 32767));
        model[h][j][i] = wr_data;
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
