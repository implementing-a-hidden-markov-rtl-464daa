// hmm_decoder_top_tb: end-to-end test of the decoder at its default size
// (49 HMMs x 3 states, 8-bit observations, 15-bit costs, RAM latency 2).
//
// The testbench plays the host and the board memory. It generates a random
// model: transition matrices with mostly forward/self transitions (other
// entries LOG_ZERO), per-HMM exit costs, and a 49 x 256 table of observation
// costs with some LOG_ZERO and some very large entries so that the scaler has
// to discard underflowed values. It loads the on-chip tables through cfg_*,
// serves the observation-cost reads with a 2-cycle memory model and captures
// the predecessor records written back.
//
// Two utterances of random observations are decoded: 300 frames (a typical
// 3-second sentence at 100 frames per second), then 25 frames. The host
// inserts idle gaps and holds data while the decoder is busy. A reference Viterbi decoder
// written here, with the same cost arithmetic and scaling rule, gives for each
// frame the expected predecessor code and discard flag of all 147 states and
// the best exit HMM and cost; the write address of each record and the frame
// time (NUM_HMM + RAM_LAT + 4 cycles from acceptance to frame_done) are
// checked too. Finally, the best path of each utterance is backtracked from
// the captured records, as the host would, and its cost recomputed from the
// model must equal the decoder's final best exit cost.
//
// Mechanisms counted (each must occur): utterance start, entry from another
// HMM, self-loop, move to a later state, scaler discard, non-zero scaling
// offset, host stall.
module hmm_decoder_top_tb;
  import viterbi_pkg::*;

  localparam int RAM_LAT = 2;
  localparam int FRAME_CYC = NUM_HMM + RAM_LAT + 4;
  localparam int T0 = 300, T1 = 25;  // 3 s of speech at 100 frames/s, then a short one
  localparam int TMAX = 512;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_start = 0, n_entry = 0, n_self = 0, n_fwd = 0, n_discard = 0, n_offset = 0, n_stall = 0;

  // DUT ports
  logic                  cfg_we, cfg_sel, start, obs_valid, obs_ready, obs_ram_re;
  hmm_idx_t              cfg_hmm, best_exit_hmm;
  logic [1:0]            cfg_from, cfg_to;
  cost_t                 cfg_data, best_exit_cost;
  obs_t                  obs_data;
  logic [HMM_W+OBS_W-1:0] obs_ram_addr;
  cost_vec_t             obs_ram_rdata;
  logic                  psi_we, frame_done;
  logic [19:0]           psi_addr;
  psi_vec_t              psi_wdata;
  logic [NUM_STATES-1:0] psi_discard;
  logic [15:0]           frame_idx;

  hmm_decoder_top dut (.*);

  // ---------------- model ----------------
  int A [NUM_HMM][3][3];   // [m][j][i], LOG_ZERO = impossible
  int E [NUM_HMM];
  cost_vec_t B [NUM_HMM * OBS_VALS];
  localparam int LZ = int'(LOG_ZERO);

  // ---------------- board memory model ----------------
  cost_vec_t ram_p [RAM_LAT];
  always_ff @(posedge clk) begin
    ram_p[0] <= obs_ram_re ? B[obs_ram_addr] : '{default: LOG_ZERO};
    for (int k = 1; k < RAM_LAT; k++) ram_p[k] <= ram_p[k-1];
  end
  assign obs_ram_rdata = ram_p[RAM_LAT-1];

  // captured predecessor records: [addr] = {discard, psi}
  logic [8:0] psi_mem [1 << 15];
  int psi_writes = 0;
  always_ff @(posedge clk) begin
    if (psi_we) begin
      psi_mem[psi_addr[14:0]] <= {psi_discard, psi_wdata};
      psi_writes <= psi_writes + 1;
    end
  end

  // ---------------- reference decoder ----------------
  int sprev [NUM_HMM][3];
  int scur  [NUM_HMM][3];
  int r_between, r_off;
  int e_psi  [NUM_HMM][3];
  int e_disc [NUM_HMM][3];
  int e_bc, e_bh;
  int obs_seq [TMAX];

  task automatic ref_init();
    for (int m = 0; m < NUM_HMM; m++) for (int j = 0; j < 3; j++) sprev[m][j] = LZ;
    r_between = 0; r_off = 0;
  endtask

  task automatic ref_frame(input int o);
    int fmin;
    fmin = -1; e_bc = LZ; e_bh = 0;
    for (int m = 0; m < NUM_HMM; m++) begin
      for (int j = 0; j < 3; j++) begin
        int best, bp, b, raw, dif;
        best = -1; bp = 0;
        for (int i = 0; i < 3; i++)
          if (sprev[m][i] != LZ && A[m][j][i] != LZ && (best < 0 || sprev[m][i] + A[m][j][i] < best)) begin
            best = sprev[m][i] + A[m][j][i]; bp = i;
          end
        if (j == 0 && r_between != LZ && (best < 0 || r_between < best)) begin
          best = r_between; bp = 3;
        end
        b = int'(B[m * OBS_VALS + o][j]);
        e_psi[m][j] = bp;
        if (best < 0 || b == LZ) begin
          scur[m][j] = LZ; e_disc[m][j] = 1;
        end else begin
          raw = best + b;
          dif = (raw > r_off) ? raw - r_off : 0;
          if (dif >= LZ) begin scur[m][j] = LZ; e_disc[m][j] = 1; end
          else begin
            scur[m][j] = dif; e_disc[m][j] = 0;
            if (fmin < 0 || dif < fmin) fmin = dif;
          end
        end
      end
      if (scur[m][2] != LZ && E[m] != LZ && scur[m][2] + E[m] < LZ && scur[m][2] + E[m] < e_bc) begin
        e_bc = scur[m][2] + E[m]; e_bh = m;
      end
    end
    r_off = (fmin < 0) ? 0 : fmin;
    if (r_off != 0) n_offset++;
    r_between = e_bc;
    sprev = scur;
  endtask

  // ---------------- host ----------------
  task automatic cfg_write(input bit sel, input int m, input int i, input int j, input int v);
    @(negedge clk);
    cfg_we = 1; cfg_sel = sel; cfg_hmm = hmm_idx_t'(m); cfg_from = 2'(i); cfg_to = 2'(j);
    cfg_data = cost_t'(v);
    @(negedge clk);
    cfg_we = 0;
  endtask

  // frame timing monitor
  int accept_cyc;
  int cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  // Decode one utterance of T frames and check it.
  task automatic utterance(input int T);
    int final_bc, final_bh, base, next_o;
    bit pending;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    n_start++;
    ref_init();
    base = psi_writes;
    pending = 0;
    for (int t = 0; t < T; t++) begin
      int o;
      if (pending) o = next_o;
      else begin
        o = int'($urandom_range(0, 255));
        repeat ($urandom_range(0, 3)) @(negedge clk);
        obs_valid = 1; obs_data = obs_t'(o);
      end
      obs_seq[t] = o;
      @(posedge clk);
      while (obs_ready !== 1'b1) @(posedge clk);
      accept_cyc = cyc;
      @(negedge clk);
      // Sometimes offer the next observation at once: it is held while the
      // decoder is busy with this frame.
      pending = (t + 1 < T) && ($urandom_range(0, 2) == 0);
      if (pending) begin
        next_o = int'($urandom_range(0, 255));
        obs_data = obs_t'(next_o);
        n_stall++;
      end else obs_valid = 0;
      ref_frame(o);
      @(posedge clk);
      while (!frame_done) @(posedge clk);
      checks++;
      if (cyc - accept_cyc != FRAME_CYC) begin
        failures++; $display("FAIL frame time %0d cycles", cyc - accept_cyc);
      end
      checks++;
      if (int'(frame_idx) != t) begin failures++; $display("FAIL frame_idx %0d", frame_idx); end
      checks++;
      if (int'(best_exit_cost) != e_bc || (e_bc != LZ && int'(best_exit_hmm) != e_bh)) begin
        failures++;
        $display("FAIL t=%0d best exit exp %0d/%0d got %0d/%0d", t, e_bc, e_bh, best_exit_cost,
                 best_exit_hmm);
      end
      final_bc = e_bc; final_bh = e_bh;
      @(negedge clk);
      checks++;
      if (psi_writes - base != (t + 1) * NUM_HMM) begin failures++; $display("FAIL record count"); end
      for (int m = 0; m < NUM_HMM; m++) begin
        logic [8:0] rec;
        rec = psi_mem[t * NUM_HMM + m];
        for (int j = 0; j < 3; j++) begin
          checks++;
          if (int'(rec[6 + j]) != e_disc[m][j] ||
              (e_disc[m][j] == 0 && int'(rec[2*j +: 2]) != e_psi[m][j])) begin
            failures++;
            $display("FAIL t=%0d m=%0d j=%0d exp psi %0d disc %0d got %0d/%0d", t, m, j,
                     e_psi[m][j], e_disc[m][j], rec[2*j +: 2], rec[6 + j]);
          end
          if (e_disc[m][j] != 0) n_discard++;
          else if (e_psi[m][j] == 3) n_entry++;
          else if (e_psi[m][j] == j) n_self++;
          else if (e_psi[m][j] < j) n_fwd++;
        end
      end
    end
    // Host backtracking from the last frame's best exit, then path cost check.
    if (final_bc != LZ) begin
      int m, j, cost, t;
      m = final_bh; j = 2; t = T - 1;
      cost = E[m];
      while (t >= 0) begin
        logic [8:0] rec;
        int p;
        rec = psi_mem[t * NUM_HMM + m];
        p = int'(rec[2*j +: 2]);
        cost += int'(B[m * OBS_VALS + obs_seq[t]][j]);
        if (t == 0) break;
        if (p == 3) begin
          // entered from the best exit of the previous frame
          int pm;
          pm = int'(best_hist[t - 1]);
          cost += E[pm];
          m = pm; j = 2;
        end else begin
          cost += A[m][j][p];
          j = p;
        end
        t--;
      end
      checks++;
      // the decoder's costs are relative to the sum of all scaling offsets
      if (cost - offset_sum(T) != final_bc || j != 0) begin
        failures++; $display("FAIL backtracked path cost %0d vs %0d (end state %0d)",
                             cost - offset_sum(T), final_bc, j);
      end
    end
  endtask

  // history of best exit HMMs and of offsets, recorded at each frame_done
  hmm_idx_t best_hist [TMAX];
  int off_hist [TMAX];
  always @(posedge clk) begin
    if (frame_done) begin
      best_hist[frame_idx[8:0]] = best_exit_hmm;
      off_hist[frame_idx[8:0]] = int'(dut.u_scaler.offset);
    end
  end
  function automatic int offset_sum(input int T);
    int s;
    s = 0;
    for (int t = 0; t < T; t++) s += off_hist[t];
    return s;
  endfunction

  initial begin
    cfg_we = 0; cfg_sel = 0; cfg_hmm = '0; cfg_from = '0; cfg_to = '0; cfg_data = '0;
    start = 0; obs_valid = 0; obs_data = '0;
    // random model
    for (int m = 0; m < NUM_HMM; m++) begin
      for (int j = 0; j < 3; j++)
        for (int i = 0; i < 3; i++)
          A[m][j][i] = (i == j)     ? int'($urandom_range(0, 400))
                     : (i == j - 1) ? int'($urandom_range(0, 700))
                     : ($urandom_range(0, 4) == 0) ? int'($urandom_range(0, 3000)) : LZ;
      E[m] = ($urandom_range(0, 9) == 0) ? LZ : int'($urandom_range(0, 600));
    end
    for (int a = 0; a < NUM_HMM * OBS_VALS; a++)
      for (int j = 0; j < 3; j++) begin
        int r;
        r = int'($urandom_range(0, 39));
        B[a][j] = (r == 0) ? LOG_ZERO : (r == 1) ? cost_t'($urandom_range(30000, 32766))
                : cost_t'($urandom_range(0, 3000));
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < NUM_HMM; m++) begin
      for (int j = 0; j < 3; j++) for (int i = 0; i < 3; i++) cfg_write(0, m, i, j, A[m][j][i]);
      cfg_write(1, m, 0, 0, E[m]);
    end
    utterance(T0);
    repeat (5) @(negedge clk);
    utterance(T1);
    checks += 7;
    if (n_start < 2)   begin failures++; $display("FAIL utterance start count %0d", n_start); end
    if (n_entry == 0)  begin failures++; $display("FAIL no entry from another HMM"); end
    if (n_self == 0)   begin failures++; $display("FAIL no self-loop"); end
    if (n_fwd == 0)    begin failures++; $display("FAIL no forward move"); end
    if (n_discard == 0) begin failures++; $display("FAIL no scaler discard"); end
    if (n_offset == 0) begin failures++; $display("FAIL scaling offset never non-zero"); end
    if (n_stall == 0)  begin failures++; $display("FAIL host never stalled"); end
    $display("mechanisms: start=%0d entry=%0d self=%0d forward=%0d discard=%0d offset=%0d stall=%0d",
             n_start, n_entry, n_self, n_fwd, n_discard, n_offset, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
