// fft_stream_tb: checks the streaming FFT in both directions against a directly
// evaluated DFT.
//
// Two instances run side by side: a forward transform fed with random 16-bit real
// and imaginary samples (IN_SHIFT = log2 N, so it must return the plain DFT), and an
// inverse transform fed with random 20-bit spectra (it must return (1/N) times the
// sum with e^{+j...}). Five frames are streamed without gaps; the first three output
// frames are compared bin by bin with the reference, with a tolerance of 2^-12 of the
// frame's largest value plus 16 LSB (twiddle rounding and the per-stage halving). The
// latency from the first input sample to the first output sample is checked against
// 2N + log2(N) clocks, and out_idx must count 0..N-1 in every frame.
module fft_stream_tb;
  import ss_pkg::*;
  localparam int N      = N_FFT;
  localparam int FRAMES = 5;
  localparam int CHECK  = 3;
  localparam longint EXP_LAT = longint'(2 * N) + longint'(LOG2N);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     in_valid;
  logic signed [15:0]       fin_re, fin_im;
  logic signed [SPEC_W-1:0] iin_re, iin_im;
  logic                     f_valid, f_first, i_valid, i_first;
  logic [LOG2N-1:0]         f_idx, i_idx;
  logic signed [SPEC_W-1:0] f_re, f_im, i_re, i_im;

  fft_stream #(.IN_W(16), .IN_SHIFT(LOG2N), .INVERSE(1'b0)) dut_f (
    .clk, .rst_n, .in_valid, .in_re (fin_re), .in_im (fin_im),
    .out_valid (f_valid), .out_first (f_first), .out_idx (f_idx), .out_re (f_re), .out_im (f_im));

  fft_stream #(.IN_W(SPEC_W), .IN_SHIFT(0), .INVERSE(1'b1)) dut_i (
    .clk, .rst_n, .in_valid, .in_re (iin_re), .in_im (iin_im),
    .out_valid (i_valid), .out_first (i_first), .out_idx (i_idx), .out_re (i_re), .out_im (i_im));

  int checks = 0, failures = 0;
  real fx_re [FRAMES*N], fx_im [FRAMES*N], ix_re [FRAMES*N], ix_im [FRAMES*N];
  real cs [N], sn [N];

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Reference transform of frame fr, bin k; dir = -1 forward, +1 inverse (with 1/N).
  task automatic ref_dft(input int fr, input int k, input int dir, output real rr, output real ri);
    rr = 0.0; ri = 0.0;
    for (int n = 0; n < N; n++) begin
      int  e;
      real ar, ai;
      e  = (n * k) % N;
      ar = (dir < 0) ? fx_re[fr*N+n] : ix_re[fr*N+n];
      ai = (dir < 0) ? fx_im[fr*N+n] : ix_im[fr*N+n];
      // (ar + j ai) * (cos + j dir sin)
      rr += ar * cs[e] - ai * dir * sn[e];
      ri += ar * dir * sn[e] + ai * cs[e];
    end
    if (dir > 0) begin rr /= N; ri /= N; end
  endtask

  int f_frame = 0, f_bin = 0, i_frame = 0, i_bin = 0;
  real f_peak [CHECK], i_peak [CHECK];
  longint cyc = 0, first_in = -1, first_out = -1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && first_in < 0) first_in <= cyc;
    if (rst_n && f_valid && first_out < 0) first_out <= cyc;
  end

  // Compare forward outputs.
  always @(posedge clk) begin
    if (rst_n && f_valid && f_frame < CHECK) begin
      real rr, ri, tol;
      ref_dft(f_frame, f_bin, -1, rr, ri);
      tol = f_peak[f_frame] / 4096.0 + 16.0;
      checks++;
      if (f_idx != LOG2N'(f_bin) || ((f_bin == 0) != f_first) ||
          (real'(f_re) - rr > tol) || (rr - real'(f_re) > tol) ||
          (real'(f_im) - ri > tol) || (ri - real'(f_im) > tol)) begin
        failures++;
        if (failures < 10) $display("FWD frame %0d bin %0d: got (%0d,%0d) idx %0d, want (%f,%f)",
                                    f_frame, f_bin, f_re, f_im, f_idx, rr, ri);
      end
      if (f_bin == N - 1) begin f_bin = 0; f_frame++; end else f_bin++;
    end
  end

  // Compare inverse outputs.
  always @(posedge clk) begin
    if (rst_n && i_valid && i_frame < CHECK) begin
      real rr, ri, tol;
      ref_dft(i_frame, i_bin, 1, rr, ri);
      tol = i_peak[i_frame] / 4096.0 + 16.0;
      checks++;
      if (i_idx != LOG2N'(i_bin) ||
          (real'(i_re) - rr > tol) || (rr - real'(i_re) > tol) ||
          (real'(i_im) - ri > tol) || (ri - real'(i_im) > tol)) begin
        failures++;
        if (failures < 10) $display("INV frame %0d n %0d: got (%0d,%0d), want (%f,%f)",
                                    i_frame, i_bin, i_re, i_im, rr, ri);
      end
      if (i_bin == N - 1) begin i_bin = 0; i_frame++; end else i_bin++;
    end
  end

  initial begin
    for (int e = 0; e < N; e++) begin
      cs[e] = $cos(2.0 * PI * e / N);
      sn[e] = $sin(2.0 * PI * e / N);
    end
    for (int i = 0; i < FRAMES * N; i++) begin
      fx_re[i] = real'($signed(16'($urandom)));
      fx_im[i] = real'($signed(16'($urandom)));
      ix_re[i] = real'($signed(20'($urandom)));
      ix_im[i] = real'($signed(20'($urandom)));
    end
    // Peak of each reference frame, for the tolerance.
    for (int fr = 0; fr < CHECK; fr++) begin
      f_peak[fr] = 0.0; i_peak[fr] = 0.0;
      for (int k = 0; k < N; k++) begin
        real rr, ri;
        ref_dft(fr, k, -1, rr, ri);
        if (rabs(rr) > f_peak[fr]) f_peak[fr] = rabs(rr);
        if (rabs(ri) > f_peak[fr]) f_peak[fr] = rabs(ri);
        ref_dft(fr, k, 1, rr, ri);
        if (rabs(rr) > i_peak[fr]) i_peak[fr] = rabs(rr);
        if (rabs(ri) > i_peak[fr]) i_peak[fr] = rabs(ri);
      end
    end
    in_valid = 1'b0;
    fin_re = '0; fin_im = '0; iin_re = '0; iin_im = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < FRAMES * N; i++) begin
      in_valid = 1'b1;
      fin_re = 16'($rtoi(fx_re[i]));
      fin_im = 16'($rtoi(fx_im[i]));
      iin_re = SPEC_W'($rtoi(ix_re[i]));
      iin_im = SPEC_W'($rtoi(ix_im[i]));
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (f_frame != CHECK || i_frame != CHECK) begin
      failures++;
      $display("only %0d forward / %0d inverse frames checked", f_frame, i_frame);
    end
    checks++;
    if (first_out - first_in != EXP_LAT) begin
      failures++;
      $display("latency %0d, expected %0d", first_out - first_in, EXP_LAT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
