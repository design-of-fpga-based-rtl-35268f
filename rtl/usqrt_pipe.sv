// usqrt_pipe: pipelined unsigned integer square root, r = floor(sqrt(x)).
//
// Digit-by-digit method: stage i tries to set result bit i (most significant first)
// and keeps it when the square of the trial root does not exceed x.
// Interface: x is XW bits (XW even), r is XW/2 bits; one root may start every clock,
// and r with out_valid appears XW/2 + 1 clocks after x and in_valid.
// It stands for the vendor CORDIC square root of the reference design; the algorithm
// is this design's own.
module usqrt_pipe #(
  parameter int unsigned XW = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [XW-1:0]     x,
  output logic              out_valid,
  output logic [XW/2-1:0]   r
);
  localparam int unsigned RW = XW / 2;

  logic [XW-1:0] xs  [RW+1];
  logic [RW-1:0] rt  [RW+1];
  logic          vld [RW+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= RW; i++) begin
        xs[i] <= '0; rt[i] <= '0; vld[i] <= 1'b0;
      end
    end else begin
      xs[0]  <= x;
      rt[0]  <= '0;
      vld[0] <= in_valid;
      for (int s = 0; s < RW; s++) begin
        logic [RW-1:0] trial;
        trial = rt[s] | (RW'(1) << (RW - 1 - s));
        rt[s+1]  <= (XW'(trial) * XW'(trial) <= xs[s]) ? trial : rt[s];
        xs[s+1]  <= xs[s];
        vld[s+1] <= vld[s];
      end
    end
  end

  assign r         = rt[RW];
  assign out_valid = vld[RW];
endmodule
