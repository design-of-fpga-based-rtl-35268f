// buffer_overlap: cuts a sample stream into overlapping frames ("buffer with overlap").
//
// The block runs at twice the input sample rate: one input sample is taken every
// second clock (sample_tick high), and one frame sample is delivered every clock, so
// each N-sample frame takes N clocks while only N-HOP = HOP new samples arrive. With
// N = 512 and HOP = 256 consecutive frames overlap by half.
//
// Structure: the input passes a one-sample register (z^-1) into a delay_chain of
// 8 lines x 32 taps = 256 stages, which shifts once per input sample (a z^-2 stage at
// the frame clock). A 9-bit frame counter k addresses the taps: its bits k[5:1] are
// the tap address shared by all lines, and the control logic turns k[8:6] into the
// line select (7 - k[8:6]). Because the chain shifts between the two clocks that read
// the same address, the two reads return consecutive samples, and the frame comes
// out oldest sample first:
//   frame output at index k = x[F + k],  F = (frame start clock)/2 - 257,
// and the next frame starts HOP samples later.
//
// Interface: din is captured at the clock edge where sample_tick is high. dout,
// dout_idx (position k in the frame) and dout_first (k = 0) are registered. dout_valid
// rises at the start of the first frame whose samples were all captured after reset
// and stays high; frames then follow back to back.
// The delay-line organisation, the counter and the control-logic line select follow the
// reference design; the clock ratio, the sample phase and the valid flag are this
// design's own choices.
module buffer_overlap
  import ss_pkg::*;
#(
  parameter int unsigned W     = SAMPLE_W,
  parameter int unsigned LINES = 8,
  parameter int unsigned TAPS  = 32
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic signed [W-1:0]               din,
  output logic                              sample_tick,
  output logic signed [W-1:0]               dout,
  output logic                              dout_valid,
  output logic                              dout_first,
  output logic [$clog2(2*LINES*TAPS)-1:0]   dout_idx
);
  localparam int unsigned STAGES = LINES * TAPS;
  localparam int unsigned KW     = $clog2(2 * STAGES);
  localparam int unsigned TW     = $clog2(TAPS);
  localparam int unsigned LW     = $clog2(LINES);

  logic [KW-1:0]       k;
  logic [1:0]          frames_seen;
  logic signed [W-1:0] zreg;
  logic [TW-1:0]       tap_sel;
  logic [LW-1:0]       line_sel;
  logic [W-1:0]        tap_data;
  logic [W-1:0]        unused_chain;

  // Free-running frame counter; frames_seen saturates at 2.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k           <= '0;
      frames_seen <= '0;
    end else begin
      k <= k + 1'b1;
      if (k == KW'(2 * STAGES - 1) && frames_seen != 2'd2) frames_seen <= frames_seen + 1'b1;
    end
  end

  assign sample_tick = ~k[0];

  // z^-1 input register
  always_ff @(posedge clk) begin
    if (sample_tick) zreg <= din;
  end

  // Counter -> tap address; control logic -> line select (oldest line first).
  assign tap_sel  = k[TW:1];
  assign line_sel = LW'(LINES - 1) - k[KW-1:TW+1];

  delay_chain #(.W(W), .LINES(LINES), .TAPS(TAPS)) u_chain (
    .clk       (clk),
    .shift_en  (sample_tick),
    .chain_in  (zreg),
    .tap_sel   (tap_sel),
    .line_sel  (line_sel),
    .dout      (tap_data),
    .chain_out (unused_chain)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout_valid <= 1'b0;
      dout_first <= 1'b0;
      dout_idx   <= '0;
      dout       <= '0;
    end else begin
      dout       <= tap_data;
      dout_idx   <= k;
      dout_first <= (k == '0);
      if (k == '0 && frames_seen == 2'd2) dout_valid <= 1'b1;
    end
  end
endmodule
