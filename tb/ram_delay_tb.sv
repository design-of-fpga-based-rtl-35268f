// ram_delay_tb: checks the RAM-based delay line: with a random enable pattern, every
// enabled output must equal the input taken D = 256 enabled clocks earlier: after the
// enabled edge j + D - 1 the output shows the word taken at edge j, as a chain of D
// registers would.
module ram_delay_tb;
  localparam int D = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        en;
  logic [27:0] din, dout;

  ram_delay #(.W(28), .D(D)) dut (.clk, .rst_n, .en, .din, .dout);

  int checks = 0, failures = 0, n_en = 0;
  logic [27:0] hist [$];

  initial begin
    en = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // dout was updated at the last enabled edge
      if (n_en > D) begin
        checks++;
        if (dout != hist[hist.size() - D]) begin
          failures++;
          if (failures < 10) $display("step %0d: dout %h want %h", n_en, dout, hist[hist.size() - D]);
        end
      end
      en  = ($urandom % 4) != 0;
      din = 28'($urandom);
      @(posedge clk);
      if (en) begin hist.push_back(din); n_en++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
