// scaler_tb: self-checking test of the Scaler.
//
// Runs several utterances of several frames. Within a frame it streams random
// raw deltas (some ACC_INF, some large enough to underflow after scaling), then
// idles and pulses frame_end. A reference offset is kept here: 0 after init,
// afterwards the smallest non-discarded output of the previous frame (0 if
// there was none). Each output must equal max(raw - offset, 0), or LOG_ZERO
// with its discard flag set when raw is ACC_INF or the difference reaches
// LOG_ZERO, one cycle after the input.
module scaler_tb;
  import viterbi_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, discards = 0, nonzero_offsets = 0;

  logic                  init, frame_end, in_valid, out_valid;
  acc_vec_t              in_delta;
  cost_vec_t             out_delta;
  logic [NUM_STATES-1:0] out_discard;

  scaler dut (.clk, .rst_n, .init, .frame_end, .in_valid, .in_delta, .out_valid, .out_delta,
              .out_discard);

  int offset, fmin;
  int exp_d [3];
  bit exp_x [3];
  bit exp_v;

  task automatic check_out();
    checks++;
    if (out_valid !== exp_v) begin failures++; $display("FAIL valid"); end
    if (exp_v) begin
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (out_discard[j] !== exp_x[j] || int'(out_delta[j]) != exp_d[j]) begin
          failures++;
          $display("FAIL j=%0d exp %0d/%0d got %0d/%0d (offset %0d)", j, exp_d[j], exp_x[j],
                   out_delta[j], out_discard[j], offset);
        end
      end
    end
  endtask

  initial begin
    init = 0; frame_end = 0; in_valid = 0; in_delta = '0; exp_v = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int u = 0; u < 4; u++) begin
      @(negedge clk);
      check_out(); exp_v = 0;
      init = 1;
      @(negedge clk);
      check_out();
      init = 0;
      offset = 0; fmin = -1;
      for (int f = 0; f < 12; f++) begin
        for (int n = 0; n < 60; n++) begin
          @(negedge clk);
          check_out();
          in_valid = ($urandom_range(0, 4) != 0);
          for (int j = 0; j < 3; j++) begin
            int r, raw, dif;
            r = int'($urandom_range(0, 9));
            raw = (r == 0) ? int'(ACC_INF)
                : (r == 1) ? offset + int'($urandom_range(30000, 60000))
                : offset + int'($urandom_range(0, 3000)) + f * 40;
            in_delta[j] = acc_t'(raw);
            dif = (raw > offset) ? raw - offset : 0;
            if (raw == int'(ACC_INF) || dif >= int'(LOG_ZERO)) begin
              exp_d[j] = int'(LOG_ZERO); exp_x[j] = 1;
            end else begin
              exp_d[j] = dif; exp_x[j] = 0;
              if (in_valid && (fmin < 0 || dif < fmin)) fmin = dif;
            end
            if (in_valid && exp_x[j]) discards++;
          end
          exp_v = in_valid;
        end
        @(negedge clk);
        check_out();
        in_valid = 0; exp_v = 0;
        @(negedge clk);
        check_out();
        frame_end = 1;
        @(negedge clk);
        check_out();
        frame_end = 0;
        offset = (fmin < 0) ? 0 : fmin;
        if (offset != 0) nonzero_offsets++;
        fmin = -1;
      end
    end
    checks += 2;
    if (discards == 0) begin failures++; $display("FAIL no discard exercised"); end
    if (nonzero_offsets == 0) begin failures++; $display("FAIL offset never non-zero"); end
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
