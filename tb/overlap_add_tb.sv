// overlap_add_tb: checks the overlap-add with hop 256 and the normalisation.
//
// Six random frames of 512 samples (up to +-2^15, so that some sums clip) are streamed
// without gaps, as the inverse FFT delivers them. From the second frame on, output
// sample i of frame m must be
//   sat16( floor( (y_m[i] + y_(m-1)[i+256]) * 60681 / 2^16 ) ),
// in order, one sample every two clocks, leaving 2i + 6 clocks after y_m[0] entered.
// Clipped samples must raise the saturated flag, and clipping must occur at least once.
module overlap_add_tb;
  import ss_pkg::*;
  localparam int N = N_FFT, L = HOP, FRAMES = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     in_valid, dout_valid, saturated;
  logic [LOG2N-1:0]         in_idx;
  logic signed [SPEC_W-1:0] din;
  logic signed [15:0]       dout;

  overlap_add dut (.clk, .rst_n, .in_valid, .in_idx, .din, .dout_valid, .dout, .saturated);

  int checks = 0, failures = 0, n_out = 0, n_sat = 0, cyc = 0;
  int y [FRAMES*N];
  int t_frame [FRAMES];

  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid && in_idx == 0) t_frame[cyc / N] = cyc;
    if (rst_n && dout_valid) begin
      int m, i;
      longint s, p, e;
      m = 1 + n_out / L;
      i = n_out % L;
      s = longint'(y[m*N+i]) + longint'(y[(m-1)*N+i+L]);
      p = (s * 60681) >>> 16;
      e = (p > 32767) ? 32767 : (p < -32768) ? -32768 : p;
      checks++;
      if (longint'(dout) != e || saturated != (p != e)) begin
        failures++;
        if (failures < 10) $display("frame %0d i %0d: got %0d sat %0d, want %0d", m, i, dout, saturated, e);
      end
      if (saturated) n_sat++;
      checks++;
      if (cyc - t_frame[m] != 2 * i + 6) begin
        failures++;
        if (failures < 10) $display("frame %0d i %0d: %0d clocks after y[0]", m, i, cyc - t_frame[m]);
      end
      n_out++;
    end
  end

  initial begin
    in_valid = 1'b0; in_idx = '0; din = '0;
    foreach (y[j]) y[j] = int'($signed(16'($urandom)));
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < FRAMES * N; j++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_idx = LOG2N'(j % N);
      din = SPEC_W'(y[j]);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (n_out != (FRAMES - 1) * L || n_sat == 0) begin
      failures++;
      $display("%0d outputs, %0d clipped", n_out, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((FRAMES + 2) * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
