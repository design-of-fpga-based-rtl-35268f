// gain_apply_tb: checks Y = floor(G*X1 / 2^16) for real and imaginary parts, with X1
// entering DELAY clocks before its gain (the default GAIN_LAT), one bin per clock;
// the bin index must travel with the data and the result must leave one clock after
// the gain.
module gain_apply_tb;
  import ss_pkg::*;
  localparam int NB = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     x_valid, y_valid;
  logic [LOG2N-1:0]         x_idx, y_idx;
  logic signed [SPEC_W-1:0] x_re, x_im, y_re, y_im;
  logic [GAIN_W-1:0]        g;

  gain_apply dut (.clk, .rst_n, .x_valid, .x_idx, .x_re, .x_im, .g, .y_valid, .y_idx, .y_re, .y_im);

  int checks = 0, failures = 0, cyc = 0;
  logic signed [SPEC_W-1:0] qre [$], qim [$];
  logic [LOG2N-1:0]         qidx [$];
  logic [GAIN_W-1:0]        gq [$];
  logic signed [SPEC_W-1:0] ere [$], eim [$];
  logic [LOG2N-1:0]         eidx [$];
  int                       et [$];

  always @(posedge clk) begin
    cyc++;
    if (rst_n && x_valid) begin
      qre.push_back(x_re); qim.push_back(x_im); qidx.push_back(x_idx);
    end
    if (rst_n && y_valid) begin
      logic signed [SPEC_W-1:0] a, b;
      logic [LOG2N-1:0] ix;
      int t0;
      a = ere.pop_front(); b = eim.pop_front(); ix = eidx.pop_front(); t0 = et.pop_front();
      checks++;
      if (y_re != a || y_im != b || y_idx != ix || cyc - t0 != 1) begin
        failures++;
        if (failures < 10) $display("y (%0d,%0d) idx %0d want (%0d,%0d) idx %0d, %0d clocks",
                                    y_re, y_im, y_idx, a, b, ix, cyc - t0);
      end
    end
  end

  initial begin
    x_valid = 1'b0; x_re = '0; x_im = '0; x_idx = '0; g = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NB + GAIN_LAT + 2; i++) begin
      @(negedge clk);
      x_valid = (i < NB);
      x_re = SPEC_W'($signed(25'($urandom)));
      x_im = SPEC_W'($signed(25'($urandom)));
      x_idx = LOG2N'(i);
      g = GAIN_W'($urandom);
      // The gain presented now belongs to the X1 of GAIN_LAT clocks ago.
      if (i >= GAIN_LAT && i - GAIN_LAT < NB) begin
        logic signed [63:0] pr, pi;
        logic signed [SPEC_W-1:0] a, b;
        a = qre.pop_front(); b = qim.pop_front();
        pr = 64'(a) * 64'(g);
        pi = 64'(b) * 64'(g);
        ere.push_back(SPEC_W'(pr >>> 16));
        eim.push_back(SPEC_W'(pi >>> 16));
        eidx.push_back(qidx.pop_front());
        et.push_back(cyc + 1);
      end
    end
    repeat (5) @(negedge clk);
    checks++;
    if (ere.size() != 0) begin failures++; $display("%0d results missing", ere.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB + 300) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
