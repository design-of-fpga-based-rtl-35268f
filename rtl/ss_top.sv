// ss_top: dual-channel short-time power spectral subtraction.
//
// Channel 1 (x1) carries speech plus background noise, channel 2 (x2) a reference
// microphone that hears only the noise. Both are cut into 512-sample frames with
// 256-sample overlap, windowed with a Hamming window and transformed. For every bin
// the noise power |D|^2 = beta*|X2|^2 and the gain G = sqrt(1 - |D|^2/|X1|^2) (zero
// where the noise dominates) are formed, the speech spectrum is scaled, Y = G*X1, and
// the inverse transform with overlap-add rebuilds the enhanced signal y.
//
//   x1 -> buffer_overlap -> x w[n] -> fft_stream --------+--------------> gain_apply
//   x2 -> buffer_overlap -> x w[n] -> fft_stream -> noise_estimation     ^    |
//                                          (|D|^2) -> gain_estimator (G) -+    v
//   y <- overlap_add <- fft_stream (inverse) <---------------------------------+
//
// Clocking: one clock at twice the sample rate (44.1 kHz for 22.05 kHz audio, or an
// FPGA clock gated to that rate). One input sample pair is taken at each clock edge
// with sample_tick high; after the pipeline has filled, y_valid pulses every second
// clock with one output sample. Input sample n reaches the output 2661 clocks after it
// was taken. All frames are processed without gaps.
// Status outputs: gain_valid/gain_limited show each bin's gain and whether the
// limiter set it to zero (Q < 1); y_saturated flags a clipped output sample.
// The imaginary output of the inverse transform is left unused: Y is conjugate
// symmetric, so it is zero up to rounding. The assertions at the end disable on the
// asynchronous reset, which makes the linter note rst_n as used both ways.
// The block structure, frame size, overlap, window and beta follow the reference
// design; clocking, word widths and the status outputs are this design's own.
module ss_top
  import ss_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic signed [SAMPLE_W-1:0]  x1,
  input  logic signed [SAMPLE_W-1:0]  x2,
  output logic                        sample_tick,
  output logic signed [SAMPLE_W-1:0]  y,
  output logic                        y_valid,
  output logic                        y_saturated,
  output logic                        gain_valid,
  output logic                        gain_limited
);
  localparam int unsigned IW = LOG2N;
  localparam int unsigned DW = 2 * SPEC_W + BETA_W + 1;

  // ---------------- STFT: framing, window, FFT -----------------------------------
  logic signed [SAMPLE_W-1:0] f1, f2;
  logic                       f_valid, f_first, unused_valid2, unused_first2, unused_tick2;
  logic [IW-1:0]              f_idx, unused_idx2;

  buffer_overlap u_buf1 (
    .clk (clk), .rst_n (rst_n), .din (x1), .sample_tick (sample_tick),
    .dout (f1), .dout_valid (f_valid), .dout_first (f_first), .dout_idx (f_idx)
  );

  buffer_overlap u_buf2 (
    .clk (clk), .rst_n (rst_n), .din (x2), .sample_tick (unused_tick2),
    .dout (f2), .dout_valid (unused_valid2), .dout_first (unused_first2),
    .dout_idx (unused_idx2)
  );

  logic [WIN_W-1:0] coef;
  logic [IW-1:0]    win_addr;

  window_rom u_win (
    .clk (clk), .rst_n (rst_n), .en (f_valid), .addr (win_addr), .coef (coef)
  );

  // Mult1 / Mult2: windowing
  localparam int unsigned MW = SAMPLE_W + WIN_W + 1;
  logic signed [MW-1:0]       m1, m2;
  logic signed [SAMPLE_W-1:0] w1, w2;
  logic                       w_valid;

  always_comb begin
    m1 = MW'(f1) * $signed({1'b0, coef});
    m2 = MW'(f2) * $signed({1'b0, coef});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w1 <= '0; w2 <= '0; w_valid <= 1'b0;
    end else begin
      w1      <= SAMPLE_W'(m1 >>> WIN_W);
      w2      <= SAMPLE_W'(m2 >>> WIN_W);
      w_valid <= f_valid;
    end
  end

  logic                     s1_valid, s1_first, s2_valid, s2_first;
  logic [IW-1:0]            s1_idx, s2_idx;
  logic signed [SPEC_W-1:0] s1_re, s1_im, s2_re, s2_im;

  fft_stream #(.IN_W(SAMPLE_W), .IN_SHIFT(LOG2N), .INVERSE(1'b0)) u_fft1 (
    .clk (clk), .rst_n (rst_n), .in_valid (w_valid), .in_re (w1), .in_im ('0),
    .out_valid (s1_valid), .out_first (s1_first), .out_idx (s1_idx),
    .out_re (s1_re), .out_im (s1_im)
  );

  fft_stream #(.IN_W(SAMPLE_W), .IN_SHIFT(LOG2N), .INVERSE(1'b0)) u_fft2 (
    .clk (clk), .rst_n (rst_n), .in_valid (w_valid), .in_re (w2), .in_im ('0),
    .out_valid (s2_valid), .out_first (s2_first), .out_idx (s2_idx),
    .out_re (s2_re), .out_im (s2_im)
  );

  // ---------------- Gain estimation ----------------------------------------------
  logic          d_valid;
  logic [DW-1:0] dpow;

  noise_estimation u_noise (
    .clk (clk), .rst_n (rst_n), .in_valid (s2_valid), .re (s2_re), .im (s2_im),
    .out_valid (d_valid), .dpow (dpow)
  );

  // Channel-1 bins wait for the two clocks of the noise estimator.
  logic signed [SPEC_W-1:0] a_re, a_im;
  logic [IW-1:0]            a_idx;
  logic [1:0]               a_valid_sr;

  pipe_delay #(.W(2 * SPEC_W + IW), .DEPTH(2)) u_align (
    .clk (clk), .din ({s1_re, s1_im, s1_idx}), .dout ({a_re, a_im, a_idx})
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a_valid_sr <= '0;
    else        a_valid_sr <= {a_valid_sr[0], s1_valid};
  end

  logic [GAIN_W-1:0] g;

  gain_estimator u_gain (
    .clk (clk), .rst_n (rst_n), .in_valid (a_valid_sr[1]), .re (a_re), .im (a_im),
    .dpow (dpow), .out_valid (gain_valid), .g (g), .limited (gain_limited)
  );

  logic                     y_sp_valid;
  logic [IW-1:0]            y_sp_idx;
  logic signed [SPEC_W-1:0] y_sp_re, y_sp_im;

  gain_apply u_apply (
    .clk (clk), .rst_n (rst_n), .x_valid (a_valid_sr[1]), .x_idx (a_idx),
    .x_re (a_re), .x_im (a_im), .g (g),
    .y_valid (y_sp_valid), .y_idx (y_sp_idx), .y_re (y_sp_re), .y_im (y_sp_im)
  );

  // ---------------- Inverse STFT -------------------------------------------------
  logic                     t_valid, t_first;
  logic [IW-1:0]            t_idx;
  logic signed [SPEC_W-1:0] t_re, t_im;

  fft_stream #(.IN_W(SPEC_W), .IN_SHIFT(0), .INVERSE(1'b1)) u_ifft (
    .clk (clk), .rst_n (rst_n), .in_valid (y_sp_valid), .in_re (y_sp_re), .in_im (y_sp_im),
    .out_valid (t_valid), .out_first (t_first), .out_idx (t_idx),
    .out_re (t_re), .out_im (t_im)
  );

  overlap_add u_ola (
    .clk (clk), .rst_n (rst_n), .in_valid (t_valid), .in_idx (t_idx), .din (t_re),
    .dout_valid (y_valid), .dout (y), .saturated (y_saturated)
  );

  // The two channels are framed in lock step, the noise power meets its bin, and the
  // gain meets its bin.
  a_sync_frames : assert property (@(posedge clk) disable iff (!rst_n)
    f_valid |-> (f_idx == unused_idx2));
  a_sync_spectra : assert property (@(posedge clk) disable iff (!rst_n)
    s1_valid |-> (s2_valid && s1_idx == s2_idx));
  a_noise_aligned : assert property (@(posedge clk) disable iff (!rst_n)
    d_valid == a_valid_sr[1]);
  a_window_aligned : assert property (@(posedge clk) disable iff (!rst_n)
    f_valid |-> (win_addr == f_idx && f_first == (f_idx == '0)));
  a_spectra_first : assert property (@(posedge clk) disable iff (!rst_n)
    s1_valid |-> (s1_first == s2_first && s1_first == (s1_idx == '0)));
  a_ifft_frame_start : assert property (@(posedge clk) disable iff (!rst_n)
    $rose(y_sp_valid) |-> (y_sp_idx == '0));
  a_ifft_first : assert property (@(posedge clk) disable iff (!rst_n)
    t_valid |-> (t_first == (t_idx == '0)));
  a_gain_aligned : assert property (@(posedge clk) disable iff (!rst_n)
    gain_valid == u_apply.v_sr[GAIN_LAT]);
endmodule
