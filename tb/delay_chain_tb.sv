// delay_chain_tb: checks the 256-stage chain of eight 32-tap delay lines. Random words are
// shifted in with a random shift enable; at every clock a random (line, tap) pair is read and
// compared with the word that entered line*32 + 31 - tap shifts ago, and chain_out with the
// word that entered 255 shifts ago.
module delay_chain_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        shift_en;
  logic [15:0] chain_in, dout, chain_out;
  logic [4:0]  sel;
  logic [2:0]  line;

  delay_chain #(.W(16), .LINES(8), .TAPS(32)) dut (
    .clk, .shift_en, .chain_in, .tap_sel (sel), .line_sel (line), .dout, .chain_out);

  int checks = 0, failures = 0;
  logic [15:0] hist [$];

  initial begin
    shift_en = 1'b1; chain_in = '0; sel = '0; line = '0;
    // fill
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      chain_in = 16'($urandom);
      shift_en = 1'b1;
      @(posedge clk);
      hist.push_front(chain_in);
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      sel = 5'($urandom);
      line = 3'($urandom);
      #1;
      checks++;
      if (dout != hist[32 * line + 31 - sel] || chain_out != hist[255]) begin
        failures++;
        if (failures < 10) $display("line %0d sel %0d: dout %h want %h, chain_out %h want %h",
                                    line, sel, dout, hist[32 * line + 31 - sel], chain_out, hist[255]);
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
