// pipe_delay: a DEPTH-stage register chain for a WIDTH-bit bundle.
//
// Used to keep side-band data (HMM index, predecessor codes, valid bits) in
// step with the arithmetic it belongs to. DEPTH = 0 is a plain wire. The
// registers are reset to zero so a delayed valid bit never starts asserted.
module pipe_delay #(
  parameter int WIDTH = 1,
  parameter int DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < DEPTH; k++) stage[k] <= '0;
      end else begin
        stage[0] <= d;
        for (int k = 1; k < DEPTH; k++) stage[k] <= stage[k-1];
      end
    end
    assign q = stage[DEPTH-1];
  end
endmodule
