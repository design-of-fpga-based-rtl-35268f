// overlap_add: the synthesis half of the inverse STFT: overlap-add of the inverse-FFT
// output frames with hop HOP, then normalisation and hand-over at the sample rate.
//
//   submatrix   : out1 = y_m[k], out2 = y_(m-1)[k+HOP] for k < HOP
//   AddSub      : s[k] = out1 + out2          (registered)
//   ola_output  : RAM hand-over to one sample per two clocks, times NORM, saturated
//
// Interface: in_valid/in_idx/din is the real part of the inverse FFT, one frame of N
// samples after another without gaps. dout/dout_valid carries one output sample every
// second clock; dout_valid stays low until the first frame whose overlapping partner
// was also received. saturated pulses when an output sample was clipped.
// Output sample i of frame m is y_m[i] + y_(m-1)[i+HOP], scaled by NORM; it leaves
// 2i + 6 clocks after y_m[0] arrived.
// The split into submatrix, adder and normalisation, and the RAM-based long delay,
// follow the reference design. The stream form replaces its matrix concatenation
// circuit: the previous frame's tail is held by the submatrix delay instead. The
// assertion at the end disables on the asynchronous reset, which makes the linter
// note rst_n as used both ways.
module overlap_add
  import ss_pkg::*;
#(
  parameter int unsigned W     = SPEC_W,
  parameter int unsigned OUT_W = SAMPLE_W,
  parameter int unsigned N     = N_FFT,
  parameter int unsigned L     = HOP
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [$clog2(N)-1:0]      in_idx,
  input  logic signed [W-1:0]       din,
  output logic                      dout_valid,
  output logic signed [OUT_W-1:0]   dout,
  output logic                      saturated
);
  localparam int unsigned IW = $clog2(N);

  logic                sm_valid;
  logic [IW-1:0]       sm_idx;
  logic signed [W-1:0] sm_out1, sm_out2;

  submatrix #(.W(W), .N(N), .L(L)) u_submatrix (
    .clk (clk), .rst_n (rst_n), .in_valid (in_valid), .in_idx (in_idx), .din (din),
    .out_valid (sm_valid), .out_idx (sm_idx), .out1 (sm_out1), .out2 (sm_out2)
  );

  // AddSub, plus the frame-rate pacing stream aligned with it.
  logic                sum_valid;
  logic [$clog2(L)-1:0] sum_idx;
  logic signed [W:0]   sum;
  logic                fr_valid, fr_valid_d;
  logic [IW-1:0]       fr_idx, fr_idx_d;
  logic                primed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_valid <= 1'b0; sum_idx <= '0; sum <= '0;
      fr_valid <= 1'b0; fr_idx <= '0; fr_valid_d <= 1'b0; fr_idx_d <= '0;
      primed <= 1'b0;
    end else begin
      sum_valid  <= sm_valid;
      sum_idx    <= ($clog2(L))'(sm_idx);
      sum        <= (W+1)'(sm_out1) + (W+1)'(sm_out2);
      fr_valid   <= in_valid;
      fr_idx     <= in_idx;
      fr_valid_d <= fr_valid;
      fr_idx_d   <= fr_idx;
      // A frame's tail is known once one full frame has passed.
      if (in_valid && in_idx == IW'(N - 1)) primed <= 1'b1;
    end
  end

  logic             primed_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) primed_d <= 1'b0;
    else if (fr_valid && fr_idx == '0) primed_d <= primed;
  end

  ola_output #(.IN_W(W + 1), .OUT_W(OUT_W), .N(N), .L(L)) u_out (
    .clk (clk), .rst_n (rst_n),
    .in_valid (sum_valid), .in_idx (sum_idx), .din (sum),
    .frame_valid (fr_valid_d && primed_d), .frame_idx (fr_idx_d),
    .dout_valid (dout_valid), .dout (dout), .saturated (saturated)
  );
  // The submatrix only presents the first half of each frame.
  a_head_only : assert property (@(posedge clk) disable iff (!rst_n)
    sm_valid |-> !sm_idx[IW-1]);
endmodule
