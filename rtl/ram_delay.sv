// ram_delay: a delay of D samples held in a simple dual-port RAM.
//
// A write address counter and a read address counter run side by side, the read
// counter one location ahead of the write counter, so each location is read back
// D-1 enables after it was written, and the registered read port adds the last one:
//   dout = din delayed by D enabled clocks.
// Both counters advance on en only, so the delay counts samples, not clocks.
// Using block RAM with two address counters for long, wide delays instead of a
// register chain follows the reference design; the counter arrangement is this
// design's own. The RAM is not reset: the first D outputs are whatever it held.
module ram_delay #(
  parameter int unsigned W = 28,
  parameter int unsigned D = 256
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout
);
  localparam int unsigned AW = $clog2(D);

  logic [W-1:0]  mem [D];
  logic [AW-1:0] wa, ra;

  always_ff @(posedge clk) begin
    if (en) begin
      mem[wa] <= din;
      dout    <= mem[ra];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wa <= '0;
      ra <= AW'(1);
    end else if (en) begin
      wa <= (wa == AW'(D - 1)) ? '0 : wa + 1'b1;
      ra <= (ra == AW'(D - 1)) ? '0 : ra + 1'b1;
    end
  end
endmodule
