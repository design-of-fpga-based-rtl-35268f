// delay_chain: LINES cascaded delay_line cells behind a LINES:1 multiplexer.
//
// The cells form one shift register of LINES*TAPS stages. Line 0 (drawn as "Delay
// Line 1") receives chain_in, and its chain output feeds line 1, and so on, so the
// oldest samples sit in the last line. All lines share the tap address tap_sel, and
// line_sel picks which line's multiplexer output reaches dout. Together they address
// any of the LINES*TAPS stages:
//   age of the sample at (line_sel, tap_sel) = line_sel*TAPS + (TAPS-1-tap_sel)
// shifts since it entered.
//
// Timing: shift on shift_en at the clock edge; dout is combinational.
// The two-level organisation (8 lines of 32 taps, shared tap address from a counter,
// line multiplexer driven by control logic) follows the reference design.
module delay_chain #(
  parameter int unsigned W     = 16,
  parameter int unsigned LINES = 8,
  parameter int unsigned TAPS  = 32
) (
  input  logic                      clk,
  input  logic                      shift_en,
  input  logic [W-1:0]              chain_in,
  input  logic [$clog2(TAPS)-1:0]   tap_sel,
  input  logic [$clog2(LINES)-1:0]  line_sel,
  output logic [W-1:0]              dout,
  output logic [W-1:0]              chain_out
);
  logic [W-1:0] link     [LINES+1];
  logic [W-1:0] line_out [LINES];

  assign link[0] = chain_in;

  for (genvar l = 0; l < LINES; l++) begin : g_line
    delay_line #(.W(W), .TAPS(TAPS)) u_line (
      .clk       (clk),
      .shift_en  (shift_en),
      .chain_in  (link[l]),
      .sel       (tap_sel),
      .dout      (line_out[l]),
      .chain_out (link[l+1])
    );
  end

  assign dout      = line_out[line_sel];
  assign chain_out = link[LINES];
endmodule
