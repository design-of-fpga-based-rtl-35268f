// ola_output: hands the overlap-added samples over at the audio sample rate and
// normalises them (the concatenate / submatrix / normalization path of the inverse
// STFT).
//
// Each frame delivers its HOP finished samples as a burst of HOP clocks (index k < HOP),
// but the output must run at one sample per two clocks, the input sample rate. A
// HOP-word RAM is written at address k during the burst and read at address k/2 on the
// odd indices k of the whole frame, so sample i leaves at index 2i+1, after it was
// written (at i) and before the next frame overwrites it (at N+i).
// Normalization multiplies by NORM (unsigned Q0.16) and saturates to OUT_W bits. With
// the periodic Hamming analysis window, overlapped copies at half a frame sum to 1.08,
// so the default NORM = round(2^16/1.08) restores unity gain.
// Interface: in_valid/in_idx/din from the overlap adder (in_valid for k < HOP, in_idx = k);
// frame_valid/frame_idx is the unbroken frame-rate valid stream that paces the read
// side. dout/dout_valid: one sample every second clock, three clocks after its read.
// The handing-over by RAM with two address counters and the constant normalization
// follow the reference design; the read schedule and NORM are this design's own.
module ola_output
  import ss_pkg::*;
#(
  parameter int unsigned  IN_W  = SPEC_W + 1,
  parameter int unsigned  OUT_W = SAMPLE_W,
  parameter int unsigned  N     = N_FFT,
  parameter int unsigned  L     = HOP,
  parameter logic [15:0]  NORM  = 16'd60681
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [$clog2(L)-1:0]      in_idx,
  input  logic signed [IN_W-1:0]    din,
  input  logic                      frame_valid,
  input  logic [$clog2(N)-1:0]      frame_idx,
  output logic                      dout_valid,
  output logic signed [OUT_W-1:0]   dout,
  output logic                      saturated
);
  localparam int unsigned AW = $clog2(L);
  localparam int unsigned PW = IN_W + 17;

  logic [IN_W-1:0]        mem [L];
  logic signed [IN_W-1:0] rd;
  logic                   rd_valid;
  logic signed [PW-1:0]   prod;
  logic                   p_valid;

  always_ff @(posedge clk) begin
    if (in_valid) mem[in_idx] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; rd_valid <= 1'b0; prod <= '0; p_valid <= 1'b0;
      dout <= '0; dout_valid <= 1'b0; saturated <= 1'b0;
    end else begin
      rd_valid <= frame_valid && frame_idx[0];
      if (frame_valid && frame_idx[0]) rd <= signed'(mem[AW'(frame_idx >> 1)]);
      prod    <= (PW'(rd) * $signed({1'b0, NORM})) >>> 16;
      p_valid <= rd_valid;
      dout_valid <= p_valid;
      saturated  <= 1'b0;
      if (prod > PW'((1 << (OUT_W - 1)) - 1)) begin
        dout <= OUT_W'((1 << (OUT_W - 1)) - 1); saturated <= p_valid;
      end else if (prod < -PW'(1 << (OUT_W - 1))) begin
        dout <= OUT_W'(-(1 << (OUT_W - 1))); saturated <= p_valid;
      end else begin
        dout <= OUT_W'(prod);
      end
    end
  end
endmodule
