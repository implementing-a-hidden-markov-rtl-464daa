// viterbi_node_tb: self-checking test of one Viterbi node.
//
// Drives an entry node and an inner node with the same random operands every
// cycle (about one operand in six is LOG_ZERO, and small values make ties
// likely), and compares delta and psi against a reference evaluated here from
// the recursion delta = min_i(prev_i + a_i) + b, with probability-zero
// operands excluded and ties to the lowest index. It also checks the 2-cycle
// latency of out_valid, including gaps in in_valid.
module viterbi_node_tb;
  import viterbi_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic      in_valid;
  cost_vec_t prev_delta, trans;
  cost_t     between, obs;
  logic      v_e, v_i;
  acc_t      d_e, d_i;
  psi_t      p_e, p_i;

  viterbi_node #(.ENTRY(1'b1)) dut_e (.clk, .rst_n, .in_valid, .prev_delta, .trans,
    .between, .obs, .out_valid(v_e), .delta(d_e), .psi(p_e));
  viterbi_node #(.ENTRY(1'b0)) dut_i (.clk, .rst_n, .in_valid, .prev_delta, .trans,
    .between, .obs, .out_valid(v_i), .delta(d_i), .psi(p_i));

  function automatic cost_t rnd_cost();
    int r;
    r = int'($urandom_range(0, 11));
    if (r < 2) return LOG_ZERO;
    if (r < 5) return cost_t'($urandom_range(0, 3));
    return cost_t'($urandom_range(0, 32766));
  endfunction

  typedef struct { logic v; int de; int pe; int di; int pi; } exp_t;
  exp_t hist [3];

  // Reference: integer arithmetic, -1 stands for probability zero.
  task automatic reference(input bit entry, output int d, output int p);
    int best;
    best = -1;
    p = 0;
    for (int i = 0; i < 4; i++) begin
      int c;
      c = -1;
      if (i < 3) c = (prev_delta[i] == LOG_ZERO || trans[i] == LOG_ZERO) ? -1
                     : int'(prev_delta[i]) + int'(trans[i]);
      else       c = (entry && between != LOG_ZERO) ? int'(between) : -1;
      if (c >= 0 && (best < 0 || c < best)) begin best = c; p = i; end
    end
    if (best < 0 || obs == LOG_ZERO) d = -1;
    else d = best + int'(obs);
  endtask

  initial begin
    in_valid = 0; prev_delta = '0; trans = '0; between = '0; obs = '0;
    for (int k = 0; k < 3; k++) hist[k] = '{0, 0, 0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // compare what entered two cycles ago
      if (hist[1].v !== v_e || hist[1].v !== v_i) begin
        failures++;
        $display("FAIL latency: expected valid %0d got %0d/%0d", hist[1].v, v_e, v_i);
      end
      checks++;
      if (hist[1].v) begin
        int gde, gdi;
        gde = (d_e == ACC_INF) ? -1 : int'(d_e);
        gdi = (d_i == ACC_INF) ? -1 : int'(d_i);
        checks += 2;
        if (gde != hist[1].de || (gde >= 0 && int'(p_e) != hist[1].pe)) begin
          failures++;
          $display("FAIL entry: exp %0d/%0d got %0d/%0d", hist[1].de, hist[1].pe, gde, p_e);
        end
        if (gdi != hist[1].di || (gdi >= 0 && int'(p_i) != hist[1].pi)) begin
          failures++;
          $display("FAIL inner: exp %0d/%0d got %0d/%0d", hist[1].di, hist[1].pi, gdi, p_i);
        end
      end
      hist[1] = hist[0];
      in_valid = ($urandom_range(0, 7) != 0);
      for (int i = 0; i < 3; i++) begin prev_delta[i] = rnd_cost(); trans[i] = rnd_cost(); end
      between = rnd_cost();
      obs = rnd_cost();
      hist[0].v = in_valid;
      reference(1'b1, hist[0].de, hist[0].pe);
      reference(1'b0, hist[0].di, hist[0].pi);
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
