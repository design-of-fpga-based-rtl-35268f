// window_rom: Hamming analysis window from a ROM addressed by a count-limited counter.
//
// The ROM holds N coefficients w(n) = 0.54 - 0.46*cos(2*pi*n/N), n = 0..N-1 (the
// periodic form, whose copies at hop N/2 add up to the constant 1.08), as unsigned
// Q0.16 values rounded and limited to 2**W-1. The table is computed when the design is
// elaborated. The address counter counts 0..N-1 and wraps, advancing on every clock
// with en high, so it stays aligned with a frame stream whose samples carry en.
//
// Interface: coef is the coefficient for the current counter value, addr; both change
// after each clock edge with en high. Timing: combinational ROM read of the registered
// address, so coef belongs to the sample presented with en in the same cycle, provided
// counting started on a frame's first sample.
// A 512-deep single-port ROM with a counter follows the reference design; the
// coefficient format and the periodic window are this design's own choices.
module window_rom
  import ss_pkg::*;
#(
  parameter int unsigned N = N_FFT,
  parameter int unsigned W = WIN_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  output logic [$clog2(N)-1:0]  addr,
  output logic [W-1:0]          coef
);
  localparam int unsigned AW = $clog2(N);

  function automatic logic [W-1:0] hamming(int n);
    real v;
    v = (0.54 - 0.46 * $cos(2.0 * PI * n / N)) * (2.0 ** W);
    if (v > (2.0 ** W) - 1.0) v = (2.0 ** W) - 1.0;
    return W'($rtoi(v + 0.5));
  endfunction

  logic [W-1:0] rom [N];

  initial begin
    for (int n = 0; n < N; n++) rom[n] = hamming(n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  addr <= '0;
    else if (en) addr <= (addr == AW'(N - 1)) ? '0 : addr + 1'b1;
  end

  assign coef = rom[addr];
endmodule
