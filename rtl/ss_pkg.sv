// Shared constants of the dual-channel short-time spectral subtraction datapath.
//
// The frame size, hop, sample width and the noise weight beta are the values of the
// reference configuration (512-point frames, 256-sample overlap, 16-bit speech,
// beta = 15). The internal word widths and fixed-point formats are this design's own
// choice and are collected here so that all blocks agree on them:
//   * samples          : SAMPLE_W-bit two's complement
//   * window           : WIN_W-bit unsigned, 1.0 = 2**WIN_W - 1 (Q0.16)
//   * spectra          : SPEC_W-bit two's complement; the forward transform returns the
//                        true DFT of the windowed frame (no 1/N scaling left over)
//   * powers           : PWR_W-bit unsigned (|X|^2), noise power NPWR_W bits (beta*|X2|^2)
//   * gain             : GAIN_W-bit unsigned, 1.0 = 2**GAIN_W (Q0.16)
package ss_pkg;
  localparam int unsigned N_FFT     = 512;
  localparam int unsigned HOP       = 256;
  localparam int unsigned LOG2N     = $clog2(N_FFT);
  localparam int unsigned SAMPLE_W  = 16;
  localparam int unsigned WIN_W     = 16;
  localparam int unsigned SPEC_W    = 28;
  localparam int unsigned TW_W      = 18;
  localparam int unsigned PWR_W     = 2 * SPEC_W + 1;
  localparam int unsigned BETA_W    = 8;
  localparam int unsigned BETA      = 15;
  localparam int unsigned NPWR_W    = PWR_W + BETA_W;
  localparam int unsigned GAIN_W    = 16;
  // Clocks from the inputs of gain_estimator to its gain output (see that module).
  localparam int unsigned GAIN_LAT  = 4 * GAIN_W + 7;
  localparam real         PI        = 3.14159265358979323846;
endpackage
