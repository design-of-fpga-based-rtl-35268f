// noise_estimation: noise power spectrum from the noise-reference channel,
//   |D(m,n)|^2 = beta * |X2(m,n)|^2 = beta * (Re^2 + Im^2).
//
// Two register stages: the squared magnitude, then the multiplication by the constant
// weight beta, which compensates the sensitivity mismatch of the two microphones.
// Interface: re/im with in_valid in, dpow with out_valid out, two clocks later; idx
// travels along. beta = 15 is the reference configuration's value; its width, the
// unsigned full-precision result and the two-stage pipeline are this design's own.
module noise_estimation
  import ss_pkg::*;
#(
  parameter int unsigned        W      = SPEC_W,
  parameter int unsigned        BW     = BETA_W,
  parameter logic [BETA_W-1:0]  BETA_V = BETA_W'(BETA)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [W-1:0]       re,
  input  logic signed [W-1:0]       im,
  output logic                      out_valid,
  output logic [2*W+BW:0]           dpow
);
  logic [2*W:0] pwr;
  logic         pwr_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pwr       <= '0;
      pwr_valid <= 1'b0;
      dpow      <= '0;
      out_valid <= 1'b0;
    end else begin
      pwr       <= unsigned'((2*W+1)'(re) * (2*W+1)'(re) + (2*W+1)'(im) * (2*W+1)'(im));
      pwr_valid <= in_valid;
      dpow      <= (2*W+BW+1)'(pwr) * (2*W+BW+1)'(BETA_V);
      out_valid <= pwr_valid;
    end
  end
endmodule
