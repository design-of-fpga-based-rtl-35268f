// delay_line_tb: checks the 32-tap addressable shift register. Random words are
// shifted in with a random shift enable; at every clock a random tap is read and
// compared with the word that entered 31 - sel shifts ago, and chain_out with the word
// that entered 31 shifts ago.
module delay_line_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        shift_en;
  logic [15:0] chain_in, dout, chain_out;
  logic [4:0]  sel;

  delay_line #(.W(16), .TAPS(32)) dut (.clk, .shift_en, .chain_in, .sel, .dout, .chain_out);

  int checks = 0, failures = 0;
  logic [15:0] hist [$];

  initial begin
    shift_en = 1'b1; chain_in = '0; sel = '0;
    // fill
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      chain_in = 16'($urandom);
      shift_en = 1'b1;
      @(posedge clk);
      hist.push_front(chain_in);
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      sel = 5'($urandom);
      #1;
      checks++;
      if (dout != hist[31 - sel] || chain_out != hist[31]) begin
        failures++;
        if (failures < 10) $display("sel %0d: dout %h want %h, chain_out %h want %h",
                                    sel, dout, hist[31 - sel], chain_out, hist[31]);
      end
      shift_en = 1'($urandom % 2);
      chain_in = 16'($urandom);
      @(posedge clk);
      if (shift_en) hist.push_front(chain_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
