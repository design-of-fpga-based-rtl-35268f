// buffer_overlap_tb: checks the framing buffer against the sample history.
//
// A counter-like random sequence is fed in, one sample on every clock with
// sample_tick high, and every captured sample is kept. Every frame sample delivered
// with dout_valid must equal x[F + k], with F = (frame start clock)/2 - 257 counted
// from the first clock after reset, and consecutive frames must start HOP samples
// apart (50 % overlap). dout_idx and dout_first are checked too, and so is the rate:
// exactly one sample taken per two clocks.
module buffer_overlap_tb;
  import ss_pkg::*;
  localparam int N = 2 * 8 * 32;
  localparam int FRAMES = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [15:0] din;
  logic               tick, dv, df;
  logic signed [15:0] dout;
  logic [8:0]         didx;

  buffer_overlap dut (
    .clk, .rst_n, .din, .sample_tick (tick), .dout, .dout_valid (dv), .dout_first (df),
    .dout_idx (didx));

  int checks = 0, failures = 0;
  logic signed [15:0] hist [$];
  int cyc = 0, n_ticks = 0, frames_done = 0, last_f = -1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (tick) begin hist.push_back(din); n_ticks++; end
      if (dv) begin
        // This output was registered at the previous edge, i.e. read in clock cyc-1.
        int k, f0, f;
        k  = (cyc - 1) % N;
        f0 = (cyc - 1) - k;
        f  = f0 / 2 - 257;
        checks++;
        if (didx != 9'(k) || df != (k == 0) || f < 0 || f + k >= hist.size() ||
            dout != hist[f + k]) begin
          failures++;
          if (failures < 10) $display("cyc %0d k %0d idx %0d: got %0d want %0d", cyc, k, didx,
                                      dout, (f >= 0 && f + k < hist.size()) ? hist[f+k] : -1);
        end
        if (k == 0) begin
          checks++;
          if (last_f >= 0 && f - last_f != HOP) begin
            failures++; $display("frame start moved by %0d", f - last_f);
          end
          last_f = f;
        end
        if (k == N - 1) frames_done++;
      end
      cyc++;
    end
  end

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (frames_done < FRAMES) begin
      @(negedge clk);
      din = 16'($urandom);
    end
    checks++;
    if (n_ticks * 2 < cyc - 2 || n_ticks * 2 > cyc + 2) begin
      failures++; $display("input rate: %0d samples in %0d clocks", n_ticks, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((FRAMES + 4) * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
