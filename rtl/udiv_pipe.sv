// udiv_pipe: pipelined unsigned fixed-point divider with saturation,
//   q = min( floor(a * 2^F / b), 2^QW - 1 ),   b = 0 gives 2^QW - 1.
//
// Restoring division, one quotient bit per pipeline stage, most significant bit
// first: stage i subtracts b*2^i from the partial remainder when it fits. An input
// register first checks for overflow (a*2^F >= b*2^QW, which includes b = 0) and the
// overflow flag then forces the saturated result at the end.
// Interface: one division may start every clock; q and out_valid appear QW+1 clocks
// after a, b and in_valid. It serves as the divider of the gain estimator; the
// reference design uses a vendor CORDIC divider there, so the algorithm is this
// design's own.
module udiv_pipe #(
  parameter int unsigned AW = 57,
  parameter int unsigned BW = 65,
  parameter int unsigned F  = 16,
  parameter int unsigned QW = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [AW-1:0]  a,
  input  logic [BW-1:0]  b,
  output logic           out_valid,
  output logic [QW-1:0]  q
);
  localparam int unsigned CW = ((AW + F) > (BW + QW) ? (AW + F) : (BW + QW)) + 1;

  logic [CW-1:0] rem  [QW+1];
  logic [BW-1:0] dvs  [QW+1];
  logic [QW-1:0] quo  [QW+1];
  logic          ovf  [QW+1];
  logic          vld  [QW+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= QW; i++) begin
        rem[i] <= '0; dvs[i] <= '0; quo[i] <= '0; ovf[i] <= 1'b0; vld[i] <= 1'b0;
      end
    end else begin
      rem[0] <= CW'(a) << F;
      dvs[0] <= b;
      quo[0] <= '0;
      ovf[0] <= ((CW'(a) << F) >> QW) >= CW'(b);
      vld[0] <= in_valid;
      for (int s = 0; s < QW; s++) begin
        logic [CW-1:0] trial;
        trial = CW'(dvs[s]) << (QW - 1 - s);
        if (!ovf[s] && rem[s] >= trial) begin
          rem[s+1] <= rem[s] - trial;
          quo[s+1] <= quo[s] | (QW'(1) << (QW - 1 - s));
        end else begin
          rem[s+1] <= rem[s];
          quo[s+1] <= quo[s];
        end
        dvs[s+1] <= dvs[s];
        ovf[s+1] <= ovf[s];
        vld[s+1] <= vld[s];
      end
    end
  end

  assign q         = ovf[QW] ? '1 : quo[QW];
  assign out_valid = vld[QW];
endmodule
