// window_rom_tb: checks the Hamming coefficients and the count-limited counter.
// Every address is compared with round(2^16*(0.54 - 0.46 cos(2 pi n/512))), limited
// to 65535, within 1 LSB; the counter must hold when en is low, advance when it is
// high and wrap from 511 to 0. Two full periods are stepped with en toggled randomly.
module window_rom_tb;
  import ss_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              en;
  logic [LOG2N-1:0]  addr;
  logic [WIN_W-1:0]  coef;

  window_rom dut (.clk, .rst_n, .en, .addr, .coef);

  int checks = 0, failures = 0;
  int expect_addr = 0, steps = 0;

  initial begin
    en = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (steps < 2 * N_FFT + 3) begin
      real w;
      int  wi;
      @(negedge clk);
      w  = (0.54 - 0.46 * $cos(2.0 * PI * expect_addr / N_FFT)) * 65536.0;
      wi = (w > 65535.0) ? 65535 : $rtoi(w + 0.5);
      checks++;
      if (addr != LOG2N'(expect_addr) || int'(coef) - wi > 1 || wi - int'(coef) > 1) begin
        failures++;
        if (failures < 10) $display("addr %0d (want %0d) coef %0d want %0d", addr, expect_addr, coef, wi);
      end
      en = ($urandom % 3) != 0;
      if (en) begin
        expect_addr = (expect_addr + 1) % N_FFT;
        steps++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8 * N_FFT) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
