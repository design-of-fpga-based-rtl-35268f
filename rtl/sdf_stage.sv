// sdf_stage: one radix-2 decimation-in-frequency stage of a single-path delay-feedback
// (SDF) pipeline FFT.
//
// Stage STAGE of an N-point transform works on blocks of 2L samples, L = N/2^(STAGE+1).
// During the first L samples of a block the input is stored in an L-deep feedback
// memory while the memory's old content (the differences of the previous block) is
// sent out, multiplied by the twiddle factor W_N^(pos*2^STAGE). During the second L
// samples the stored sample a and the input b form a butterfly: (a+b)/2 goes out at
// once and (a-b)/2 goes back into the memory. Each butterfly halves its result, so a
// full pipeline returns the DFT divided by N. INVERSE selects conjugate twiddles.
//
// Interface: one complex sample in and one out per clock with in_valid; out is
// registered (one clock). The stage's block counter starts at 2L mod N after reset,
// which aligns it with the stream delayed by the stages before it (whose delays add up
// to N - 2L). The transform is used only through fft_stream.
// The reference design uses a vendor transform core; this stage structure is this
// design's own. Only the three-multiplier complex product follows the reference.
module sdf_stage
  import ss_pkg::*;
#(
  parameter int unsigned N       = N_FFT,
  parameter int unsigned STAGE   = 0,
  parameter int unsigned W       = SPEC_W,
  parameter int unsigned CW      = TW_W,
  parameter bit          INVERSE = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned L    = N >> (STAGE + 1);
  localparam int unsigned LB   = $clog2(L);          // bit of cnt that marks the 2nd half
  localparam int unsigned PW   = (L > 1) ? $clog2(L) : 1;
  localparam int unsigned FRAC = CW - 2;
  localparam int unsigned NTW  = (L > 1) ? L : 1;

  // Twiddle table for this stage: entry p = W_N^(p*2^STAGE).
  logic signed [CW-1:0] tw_re [NTW];
  logic signed [CW-1:0] tw_im [NTW];

  function automatic logic signed [CW-1:0] tw_cos(int p);
    real v;
    v = $cos(2.0 * PI * p * (2 ** STAGE) / N) * (2.0 ** FRAC);
    return CW'($rtoi($floor(v + 0.5)));
  endfunction

  function automatic logic signed [CW-1:0] tw_sin(int p);
    real v;
    v = $sin(2.0 * PI * p * (2 ** STAGE) / N) * (2.0 ** FRAC);
    return CW'($rtoi($floor(v + 0.5)));
  endfunction

  initial begin
    for (int p = 0; p < NTW; p++) begin
      tw_re[p] = tw_cos(p);
      tw_im[p] = INVERSE ? tw_sin(p) : -tw_sin(p);
    end
  end

  logic [LOGN-1:0]     cnt;
  logic [PW-1:0]       ptr;
  logic signed [W-1:0] fb_re [L];
  logic signed [W-1:0] fb_im [L];
  logic signed [W-1:0] f_re, f_im, t_re, t_im;
  logic signed [W:0]   sum_re, sum_im, dif_re, dif_im;
  logic                second_half;
  logic [PW-1:0]       pos;

  assign second_half = cnt[LB];
  assign pos         = PW'(cnt & LOGN'(L - 1));
  assign f_re        = fb_re[ptr];
  assign f_im        = fb_im[ptr];

  always_comb begin
    sum_re = (W+1)'(f_re) + (W+1)'(in_re);
    sum_im = (W+1)'(f_im) + (W+1)'(in_im);
    dif_re = (W+1)'(f_re) - (W+1)'(in_re);
    dif_im = (W+1)'(f_im) - (W+1)'(in_im);
  end

  cmul3 #(.DW(W), .CW(CW), .FRAC(FRAC)) u_tw (
    .a (f_re), .b (f_im), .c (tw_re[pos]), .d (tw_im[pos]), .re (t_re), .im (t_im)
  );

  always_ff @(posedge clk) begin
    if (in_valid) begin
      fb_re[ptr] <= second_half ? W'(dif_re >>> 1) : in_re;
      fb_im[ptr] <= second_half ? W'(dif_im >>> 1) : in_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= LOGN'((2 * L) % N);
      ptr       <= '0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        cnt    <= cnt + 1'b1;
        ptr    <= (L > 1) ? ((ptr == PW'(L - 1)) ? '0 : ptr + 1'b1) : '0;
        out_re <= second_half ? W'(sum_re >>> 1) : t_re;
        out_im <= second_half ? W'(sum_im >>> 1) : t_im;
      end
    end
  end
endmodule
