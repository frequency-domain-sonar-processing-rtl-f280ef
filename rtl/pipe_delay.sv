// pipe_delay: fixed-length register chain that keeps side-band signals
// (valid, bin index, flags, operands) aligned with a pipelined datapath.
//
// DEPTH registers of W bits; out is in delayed by DEPTH clocks. DEPTH = 0 is
// a plain wire. rst (synchronous, active high) clears every stage, so a valid
// bit carried here never emerges from uninitialised state.
module pipe_delay #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in,
  output logic [W-1:0] out
);

  if (DEPTH == 0) begin : g_wire
    assign out = in;
  end else begin : g_regs
    logic [W-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < int'(DEPTH); i++) stage[i] <= '0;
      end else begin
        stage[0] <= in;
        for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
      end
    end
    assign out = stage[DEPTH-1];
  end

endmodule
