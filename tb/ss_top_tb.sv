// ss_top_tb: end-to-end run of the spectral-subtraction core on the reference noise
// scenario, compared with a floating-point short-time spectral subtraction.
//
// Stimulus (2 s at 22.05 kHz, 16-bit, full scale = 1.0):
//   x1 = speech-like signal + noise A,  x2 = noise B (independent of A, same level)
//   noise: zero-mean Gaussian, variance 0.03 from 0 s, 0.07 from 0.5 s, 0.05 from 1.5 s
//   "speech": bursts (syllables of 0.12-0.25 s with pauses) of a 140-190 Hz harmonic
//   series with 12 harmonics, peak about 0.45; the sum is clipped to 16 bits.
// The reference model frames x1 and x2 exactly as the hardware does (512 samples,
// hop 256, periodic Hamming window), takes DFTs in double precision, forms
// D = 15|X2|^2, G = sqrt(1 - D/|X1|^2) or 0, Y = G X1, inverse DFT, overlap-add and
// division by 1.08. Output sample j of the core is its input sample 511 + j.
//
// Checks:
//   * every output sample within 2 % of full scale of the reference, or the hop's RMS
//     error at least 30 dB under the reference hop's energy (G is steep where
//     |X1|^2 is close to |D|^2, so single bins may differ);
//   * accuracy: the largest error over all compared samples under 0.90625 % of full
//     scale, the bound reported for the original fixed-point model;
//   * output rate: y_valid exactly every second clock once running;
//   * latency: a constant number of clocks from the capture of input sample n to the
//     output of sample n;
//   * noise reduction: in speech pauses the output energy is at least 10 dB below the
//     input's;
//   * mechanisms: the gain limiter (Q < 1) and the pass path (Q >= 1) each occur, and
//     overlap-add output hops in each of the three noise periods.
module ss_top_tb;
  import ss_pkg::*;
  localparam int  FS       = 22050;
  localparam int  NSAMP    = 2 * FS;
  localparam int  T1       = FS / 2;          // 0.5 s
  localparam int  T2       = 3 * FS / 2;      // 1.5 s
  localparam int  N        = N_FFT;
  localparam int  R        = HOP;
  // The core counts the sample on its inputs while reset is released as its sample 0,
  // so the first sample of this bench is the core's sample 1: the core's frames start
  // at its samples 255 + 256m, here 254 + 256m, and its first output (core sample
  // 511) is sample 510 here.
  localparam int  FB       = 254;             // start of the first frame
  localparam int  F0       = 510;             // first output sample index
  localparam int  NFR      = (NSAMP - F0 - N) / R;  // reference frames covered

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [15:0] x1, x2, y;
  logic               sample_tick, y_valid, y_sat, g_valid, g_lim;

  ss_top dut (.clk, .rst_n, .x1, .x2, .sample_tick, .y, .y_valid, .y_saturated (y_sat),
              .gain_valid (g_valid), .gain_limited (g_lim));

  int checks = 0, failures = 0;

  // ---------------- stimulus ------------------------------------------------------
  real s_sig [NSAMP];
  int  in1 [NSAMP], in2 [NSAMP];
  bit  speech_on [NSAMP];

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  function automatic int clip16(real v);
    real s;
    s = v * 32768.0;
    if (s > 32767.0) return 32767;
    if (s < -32768.0) return -32768;
    return $rtoi(s >= 0.0 ? s + 0.5 : s - 0.5);
  endfunction

  task automatic make_stimulus();
    int  n, len, gap;
    real f0, amp, ph;
    n = 0;
    while (n < NSAMP) begin
      // pause
      gap = FS / 20 + $urandom % (FS / 8);
      for (int i = 0; i < gap && n < NSAMP; i++) begin s_sig[n] = 0.0; speech_on[n] = 0; n++; end
      // syllable
      len = FS / 8 + $urandom % (FS / 8);
      f0  = 140.0 + real'($urandom % 50);
      amp = 0.25 + real'($urandom % 20) / 100.0;
      ph  = 0.0;
      for (int i = 0; i < len && n < NSAMP; i++) begin
        real env, v;
        env = $sin(PI * i / len);
        v = 0.0;
        for (int h = 1; h <= 12; h++) v += $sin(2.0 * PI * f0 * h * i / FS) / h;
        s_sig[n] = amp * env * v / 2.5;
        speech_on[n] = 1;
        n++;
      end
    end
    for (int i = 0; i < NSAMP; i++) begin
      real sd;
      sd = (i < T1) ? $sqrt(0.03) : (i < T2) ? $sqrt(0.07) : $sqrt(0.05);
      in1[i] = clip16(s_sig[i] + sd * gauss());
      in2[i] = clip16(sd * gauss());
    end
  endtask

  // ---------------- reference model ----------------------------------------------
  real cs [N], sn [N], win [N];
  real yref [NSAMP];

  task automatic reference();
    real xr1 [N], xi1 [N], xr2 [N], xi2 [N], yr [N], prev_tail [R];
    for (int i = 0; i < NSAMP; i++) yref[i] = 0.0;
    for (int i = 0; i < R; i++) prev_tail[i] = 0.0;
    for (int m = 0; m <= NFR + 1; m++) begin
      int f;
      f = FB + R * m;
      if (f + N > NSAMP) break;
      for (int k = 0; k < N; k++) begin
        real a1, b1, a2, b2;
        a1 = 0.0; b1 = 0.0; a2 = 0.0; b2 = 0.0;
        for (int n = 0; n < N; n++) begin
          int  e;
          real v1, v2;
          e  = (n * k) % N;
          v1 = real'(in1[f+n]) * win[n];
          v2 = real'(in2[f+n]) * win[n];
          a1 += v1 * cs[e]; b1 -= v1 * sn[e];
          a2 += v2 * cs[e]; b2 -= v2 * sn[e];
        end
        begin
          real p1, d, g;
          p1 = a1 * a1 + b1 * b1;
          d  = 15.0 * (a2 * a2 + b2 * b2);
          g  = (p1 <= d) ? 0.0 : $sqrt(1.0 - d / p1);
          xr1[k] = g * a1; xi1[k] = g * b1;
        end
      end
      for (int n = 0; n < N; n++) begin
        real acc;
        acc = 0.0;
        for (int k = 0; k < N; k++) begin
          int e;
          e = (n * k) % N;
          acc += xr1[k] * cs[e] - xi1[k] * sn[e];
        end
        yr[n] = acc / N;
      end
      for (int i = 0; i < R; i++) begin
        yref[f + i] = (yr[i] + prev_tail[i]) / 1.08;
        prev_tail[i] = yr[i + R];
      end
    end
  endtask

  // ---------------- drive ----------------------------------------------------------
  int     n_in = 0;
  longint cyc = 0;
  longint t_in [NSAMP];

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n && sample_tick) begin
      x1 <= 16'(n_in < NSAMP ? in1[n_in] : 0);
      x2 <= 16'(n_in < NSAMP ? in2[n_in] : 0);
      if (n_in < NSAMP) t_in[n_in] = cyc + 1;   // captured at the coming edge
      n_in <= n_in + 1;
    end
  end

  // ---------------- monitor --------------------------------------------------------
  int     n_out = 0, n_lim = 0, n_pass = 0, n_sat = 0, bad_gap = 0, bad_lat = 0;
  longint last_out = -1, lat0 = -1;
  int     hops_in_period [3];
  real    yhw [NSAMP];
  real    e_in_pause = 0.0, e_out_pause = 0.0;
  real    max_err = 0.0;
  int     n_cmp = 0, n_fine = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (g_valid && g_lim) n_lim++;
      if (g_valid && !g_lim) n_pass++;
      if (y_valid) begin
        int idx;
        idx = F0 + n_out;
        if (last_out >= 0 && cyc - last_out != 2) bad_gap++;
        last_out = cyc;
        if (idx < NSAMP) begin
          yhw[idx] = real'(y);
          if (lat0 < 0) lat0 = cyc - t_in[idx];
          else if (cyc - t_in[idx] != lat0) bad_lat++;
          if (idx % R == F0 % R)
            hops_in_period[(idx < T1) ? 0 : (idx < T2) ? 1 : 2]++;
        end
        if (y_sat) n_sat++;
        n_out++;
      end
    end
  end

  // ---------------- run ------------------------------------------------------------
  initial begin
    x1 = '0; x2 = '0;
    for (int e = 0; e < N; e++) begin
      cs[e]  = $cos(2.0 * PI * e / N);
      sn[e]  = $sin(2.0 * PI * e / N);
      win[e] = 0.54 - 0.46 * $cos(2.0 * PI * e / N);
    end
    make_stimulus();
    reference();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (n_in >= NSAMP + 2 * N);
    repeat (10) @(posedge clk);

    // Compare hop by hop over the frames the reference covers.
    for (int h = 0; h < NFR; h++) begin
      real es, ee;
      int  nbad;
      es = 0.0; ee = 0.0; nbad = 0;
      for (int i = 0; i < R; i++) begin
        int n;
        real d;
        n = F0 + h * R + i;
        d = yhw[n] - yref[n];
        es += yref[n] * yref[n];
        ee += d * d;
        if (d > 655.0 || d < -655.0) nbad++;
        if (d < 0.0) d = -d;
        if (d > max_err) max_err = d;
        n_cmp++;
        if (d <= 0.0090625 * 32768.0) n_fine++;
      end
      checks++;
      if (nbad != 0 && ee * 1000.0 > es) begin
        failures++;
        if (failures < 10) $display("hop %0d: %0d samples off by > 2%%, error/signal %g", h, nbad, ee / (es + 1e-9));
      end
    end
    // Noise reduction in pauses (away from syllable edges).
    for (int n = F0 + N; n < F0 + NFR * R; n++) begin
      bit quiet;
      quiet = 1;
      for (int j = -N; j <= N; j += 64)
        if (n + j >= 0 && n + j < NSAMP && speech_on[n + j]) quiet = 0;
      if (quiet) begin
        e_in_pause  += real'(in1[n]) * real'(in1[n]);
        e_out_pause += yhw[n] * yhw[n];
      end
    end
    checks++;
    if (e_in_pause == 0.0 || e_out_pause * 10.0 > e_in_pause) begin
      failures++;
      $display("pause energy in %g out %g", e_in_pause, e_out_pause);
    end
    checks++;
    if (bad_gap != 0 || bad_lat != 0) begin
      failures++;
      $display("output spacing errors %0d, latency changes %0d", bad_gap, bad_lat);
    end
    // Mechanisms
    checks++;
    if (n_lim == 0 || n_pass == 0) begin
      failures++; $display("limiter used %0d times, pass %0d times", n_lim, n_pass);
    end
    for (int p = 0; p < 3; p++) begin
      checks++;
      if (hops_in_period[p] == 0) begin
        failures++; $display("no overlap-add output in noise period %0d", p);
      end
    end
    $display("outputs %0d, latency %0d clocks (%0d samples), gains limited %0d / passed %0d, clipped %0d",
             n_out, lat0, lat0 / 2, n_lim, n_pass, n_sat);
    $display("hops per noise period: %0d %0d %0d; pause noise reduced by %0.1f dB",
             hops_in_period[0], hops_in_period[1], hops_in_period[2],
             10.0 * $log10(e_in_pause / (e_out_pause + 1.0)));
    checks++;
    if (max_err > 0.0090625 * 32768.0) failures++;
    $display("error against the reference: max %0.3f %% of full scale, %0d of %0d samples within 0.90625 %%",
             100.0 * max_err / 32768.0, n_fine, n_cmp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (2 * NSAMP + 8 * N) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
