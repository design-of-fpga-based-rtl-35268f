// pipe_delay: DEPTH-stage register pipeline for a W-bit word (DEPTH = 0 is a wire).
// Used to balance the latencies of parallel datapath branches. The registers have no
// reset; a valid flag sent through its own instance with a reset keeps track of them.
// Timing: dout is din delayed by DEPTH clocks. The reference design only draws its
// branches as joined; this explicit balancing is this design's own.
module pipe_delay #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [W-1:0] sr [DEPTH];
    always_ff @(posedge clk) begin
      sr[0] <= din;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
    assign dout = sr[DEPTH-1];
  end
endmodule
