// gain_estimator_tb: checks G = sqrt(1 - 1/max(Q,1)), Q = |X1|^2/|D|^2, bin by bin.
//
// A new bin enters on every clock: random X1 up to 2^24 and a noise power drawn as
// |X1|^2 times a random ratio between 10^-4 and 10 (so about a third of the bins fall
// under the limiter), plus bins with zero noise power and bins with zero speech. The
// reference is computed in floating point; since G is a square root, it is compared
// through its square: |G^2 - (1 - 1/Q)*2^32| <= 5*2^16 (Q and 1/Q are truncated to
// 16 fractional bits, the root is floored). The limiter flag must match Q < 1 except
// within 10^-4 of 1, and the latency must be GAIN_LAT clocks.
module gain_estimator_tb;
  import ss_pkg::*;
  localparam int DW = 2 * SPEC_W + BETA_W + 1;
  localparam int NB = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     in_valid;
  logic signed [SPEC_W-1:0] re, im;
  logic [DW-1:0]            dpow;
  logic                     out_valid, limited;
  logic [GAIN_W-1:0]        g;

  gain_estimator dut (.clk, .rst_n, .in_valid, .re, .im, .dpow, .out_valid, .g, .limited);

  int checks = 0, failures = 0, n_lim = 0, n_pass = 0;
  real qref [$];
  int  tin [$];
  int  cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid) tin.push_back(cyc);
    if (rst_n && out_valid) begin
      real q, s, g2;
      int  t0;
      q  = qref.pop_front();
      t0 = tin.pop_front();
      s  = (q < 1.0) ? 0.0 : 1.0 - 1.0 / q;
      g2 = real'(g) * real'(g);
      checks++;
      if (g2 - s * 4294967296.0 > 5.0 * 65536.0 || s * 4294967296.0 - g2 > 5.0 * 65536.0) begin
        failures++;
        if (failures < 10) $display("Q=%g: g=%0d, want about %f", q, g, $sqrt(s) * 65536.0);
      end
      if (q < 0.9999 || q > 1.0001) begin
        checks++;
        if (limited != (q < 1.0)) begin
          failures++;
          if (failures < 10) $display("Q=%g: limited=%0d", q, limited);
        end
      end
      if (limited) n_lim++; else n_pass++;
      checks++;
      if (cyc - t0 != GAIN_LAT) begin
        failures++;
        if (failures < 10) $display("latency %0d, expected %0d", cyc - t0, GAIN_LAT);
      end
    end
  end

  initial begin
    in_valid = 1'b0; re = '0; im = '0; dpow = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NB; i++) begin
      real p1, r, d;
      longint unsigned di;
      @(negedge clk);
      re = SPEC_W'($signed(25'($urandom)));
      im = SPEC_W'($signed(25'($urandom)));
      if (i % 50 == 7) begin re = '0; im = '0; end
      p1 = real'(re) * real'(re) + real'(im) * real'(im);
      r  = 10.0 ** (-4.0 + 5.0 * real'($urandom % 10000) / 10000.0);
      di = longint'(p1 * r);
      if (i % 50 == 3) di = 0;
      dpow = DW'(di);
      d = real'(di);
      qref.push_back(d == 0.0 ? 1.0e30 : p1 / d);
      in_valid = 1'b1;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (GAIN_LAT + 5) @(negedge clk);
    checks++;
    if (qref.size() != 0 || n_lim == 0 || n_pass == 0) begin
      failures++;
      $display("left over %0d, limited %0d, passed %0d", qref.size(), n_lim, n_pass);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
