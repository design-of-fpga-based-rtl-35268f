// noise_estimation_tb: checks |D|^2 = beta*(Re^2 + Im^2) with beta = 15 on random bins
// (full 28-bit range and the extreme values), one bin per clock, two clocks latency.
module noise_estimation_tb;
  import ss_pkg::*;
  localparam int DW = 2 * SPEC_W + BETA_W + 1;
  localparam int NB = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     in_valid, out_valid;
  logic signed [SPEC_W-1:0] re, im;
  logic [DW-1:0]            dpow;

  noise_estimation dut (.clk, .rst_n, .in_valid, .re, .im, .out_valid, .dpow);

  int checks = 0, failures = 0, cyc = 0;
  logic [DW-1:0] expq [$];
  int            tq [$];

  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid) begin
      // reference: 15 * (re^2 + im^2) in 128-bit arithmetic
      logic signed [127:0] r2;
      r2 = 128'(re) * 128'(re) + 128'(im) * 128'(im);
      expq.push_back(DW'(r2 * 128'(BETA)));
      tq.push_back(cyc);
    end
    if (rst_n && out_valid) begin
      logic [DW-1:0] e;
      int t0;
      e = expq.pop_front();
      t0 = tq.pop_front();
      checks++;
      if (dpow != e || cyc - t0 != 2) begin
        failures++;
        if (failures < 10) $display("dpow %0d want %0d (latency %0d)", dpow, e, cyc - t0);
      end
    end
  end

  initial begin
    in_valid = 1'b0; re = '0; im = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NB; i++) begin
      @(negedge clk);
      re = SPEC_W'($urandom);
      im = SPEC_W'($urandom);
      if (i == 5) begin re = {1'b1, {(SPEC_W-1){1'b0}}}; im = re; end
      if (i == 6) begin re = {1'b0, {(SPEC_W-1){1'b1}}}; im = re; end
      in_valid = 1'b1;
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d results missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
