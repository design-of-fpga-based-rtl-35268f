// fft_stream: N-point streaming FFT (INVERSE = 0) or inverse FFT (INVERSE = 1) with
// natural-order input and output, one complex sample per clock.
//
// A chain of log2(N) radix-2 SDF stages (sdf_stage) computes the transform with a
// halving in every butterfly; its result appears in bit-reversed order. A reorder
// memory of two N-word banks then writes each frame at bit-reversed addresses and
// reads the previous frame back in natural order.
//
// Scaling: the input is shifted left by IN_SHIFT before the first stage. The stages
// together divide by N, so
//   forward, IN_SHIFT = log2(N): out = DFT(in)              (true DFT, no 1/N)
//   inverse, IN_SHIFT = 0      : out = (1/N) sum in*e^{+j..} (true inverse DFT)
// The caller must keep |in| * 2^IN_SHIFT below 2^(W-2).
//
// Interface: in_valid marks input samples; frames must follow each other without gaps
// in the valid stream, the first valid sample after reset being index 0 of a frame.
// out_valid rises at index 0 of the first complete frame and then follows in_valid;
// out_idx is the bin (or sample) index and out_first marks index 0.
// Latency: with an unbroken valid stream, sample 0 of a frame leaves 2N + log2(N)
// clocks after it entered (log2(N) stage registers, N - 1 samples of SDF delay, N in
// the reorder memory, one output register).
// The transform length, the streaming (pipelined) I/O and the three-multiplier complex
// products are the configuration named in the reference design; the SDF architecture,
// the reorder memory and the scaling are this design's own choices.
module fft_stream
  import ss_pkg::*;
#(
  parameter int unsigned N        = N_FFT,
  parameter int unsigned IN_W     = SAMPLE_W,
  parameter int unsigned W        = SPEC_W,
  parameter int unsigned CW       = TW_W,
  parameter int unsigned IN_SHIFT = LOG2N,
  parameter bit          INVERSE  = 1'b0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_re,
  input  logic signed [IN_W-1:0] in_im,
  output logic                   out_valid,
  output logic                   out_first,
  output logic [$clog2(N)-1:0]   out_idx,
  output logic signed [W-1:0]    out_re,
  output logic signed [W-1:0]    out_im
);
  localparam int unsigned S = $clog2(N);

  logic                s_valid [S+1];
  logic signed [W-1:0] s_re    [S+1];
  logic signed [W-1:0] s_im    [S+1];

  assign s_valid[0] = in_valid;
  assign s_re[0]    = W'(in_re) <<< IN_SHIFT;
  assign s_im[0]    = W'(in_im) <<< IN_SHIFT;

  for (genvar s = 0; s < S; s++) begin : g_stage
    sdf_stage #(.N(N), .STAGE(s), .W(W), .CW(CW), .INVERSE(INVERSE)) u_stage (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (s_valid[s]),
      .in_re     (s_re[s]),
      .in_im     (s_im[s]),
      .out_valid (s_valid[s+1]),
      .out_re    (s_re[s+1]),
      .out_im    (s_im[s+1])
    );
  end

  // Reorder memory: bank wbank is written at bit-reversed addresses, the other bank
  // is read in natural order.
  logic signed [W-1:0] mem_re [2*N];
  logic signed [W-1:0] mem_im [2*N];
  logic [S-1:0]        cnt, cnt_rev;
  logic                wbank;
  logic [1:0]          wraps;

  always_comb begin
    for (int b = 0; b < S; b++) cnt_rev[b] = cnt[S-1-b];
  end

  always_ff @(posedge clk) begin
    if (s_valid[S]) begin
      mem_re[{wbank, cnt_rev}] <= s_re[S];
      mem_im[{wbank, cnt_rev}] <= s_im[S];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= S'(1);        // the stages delay the stream by N-1 samples
      wbank     <= 1'b0;
      wraps     <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_idx   <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      if (s_valid[S]) begin
        cnt <= cnt + 1'b1;
        if (cnt == S'(N - 1)) begin
          wbank <= ~wbank;
          if (wraps != 2'd2) wraps <= wraps + 1'b1;
        end
        out_re    <= mem_re[{~wbank, cnt}];
        out_im    <= mem_im[{~wbank, cnt}];
        out_idx   <= cnt;
        out_first <= (cnt == '0);
        out_valid <= (wraps == 2'd2);
      end
    end
  end
endmodule
