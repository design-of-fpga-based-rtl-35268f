// gain_apply: applies the spectral gain to the speech spectrum, Y = G * X1
// (real and imaginary parts multiplied separately by the real gain).
//
// X1 reaches the gain estimator and this block at the same time, while G comes
// DELAY clocks later, so X1 (with its valid flag and bin index) passes a DELAY-stage
// delay first. Each product is shifted right by GW (G is unsigned Q0.16) and
// registered: Y leaves one clock after G arrives.
// The two multipliers follow the reference design; the delay balancing, the formats
// and the rounding toward minus infinity are this design's own.
module gain_apply
  import ss_pkg::*;
#(
  parameter int unsigned W     = SPEC_W,
  parameter int unsigned GW    = GAIN_W,
  parameter int unsigned IW    = LOG2N,
  parameter int unsigned DELAY = GAIN_LAT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_valid,
  input  logic [IW-1:0]        x_idx,
  input  logic signed [W-1:0]  x_re,
  input  logic signed [W-1:0]  x_im,
  input  logic [GW-1:0]        g,
  output logic                 y_valid,
  output logic [IW-1:0]        y_idx,
  output logic signed [W-1:0]  y_re,
  output logic signed [W-1:0]  y_im
);
  logic signed [W-1:0] d_re, d_im;
  logic [IW-1:0]       d_idx;
  logic                d_valid;

  pipe_delay #(.W(2 * W + IW), .DEPTH(DELAY)) u_x_dly (
    .clk (clk), .din ({x_re, x_im, x_idx}), .dout ({d_re, d_im, d_idx})
  );

  // The valid flag is delayed in registers with a reset.
  logic [DELAY:0] v_sr;
  assign v_sr[0] = x_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_sr[DELAY:1] <= '0;
    else        v_sr[DELAY:1] <= v_sr[DELAY-1:0];
  end
  assign d_valid = v_sr[DELAY];

  localparam int unsigned PW = W + GW + 1;
  logic signed [PW-1:0] p_re, p_im;

  always_comb begin
    p_re = PW'(d_re) * $signed({1'b0, g});
    p_im = PW'(d_im) * $signed({1'b0, g});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0; y_idx <= '0; y_re <= '0; y_im <= '0;
    end else begin
      y_valid <= d_valid;
      y_idx   <= d_idx;
      y_re    <= W'(p_re >>> GW);
      y_im    <= W'(p_im >>> GW);
    end
  end
endmodule
