// delay_line: one "Delay Line" cell of the framing and overlap-add buffers.
//
// A chain of TAPS registers that shifts by one position whenever shift_en is high.
// Every register is a tap of a TAPS:1 read multiplexer, so the cell is an addressable
// shift register. New data enter at tap TAPS-1 (chain_in) and leave from tap 0
// (chain_out), which feeds chain_in of the next cell when several cells are cascaded.
// Tap i therefore holds the sample that entered TAPS-1-i shifts ago.
//
// Interface: chain_in/chain_out are the cascade, sel picks the tap shown on dout.
// Timing: shifting is synchronous; dout is combinational from sel and the registers.
// The structure (a register chain with all stages on a multiplexer, 32 taps, cascade
// in and out) follows the delay-line figures of the reference design; the registers
// have no reset, as shift-register primitives have none, and data are only read after
// they have been filled.
module delay_line #(
  parameter int unsigned W    = 16,
  parameter int unsigned TAPS = 32
) (
  input  logic                      clk,
  input  logic                      shift_en,
  input  logic [W-1:0]              chain_in,
  input  logic [$clog2(TAPS)-1:0]   sel,
  output logic [W-1:0]              dout,
  output logic [W-1:0]              chain_out
);
  logic [W-1:0] tap [TAPS];

  always_ff @(posedge clk) begin
    if (shift_en) begin
      tap[TAPS-1] <= chain_in;
      for (int i = 0; i < TAPS - 1; i++) tap[i] <= tap[i+1];
    end
  end

  assign dout      = tap[sel];
  assign chain_out = tap[0];
endmodule
