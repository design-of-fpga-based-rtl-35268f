// submatrix: splits each N-sample output frame of the inverse FFT into its leading
// N-L and trailing L samples and presents them side by side for the overlap-add.
//
// The frame arrives as a stream, sample k of frame m at index k. Output 1 carries the
// leading part directly; output 2 carries the trailing part through an L-sample delay
// (ram_delay), so while k < N-L the two outputs hold
//   out1 = y_m[k],   out2 = y_(m-1)[k + L]       (here N-L = L = 256)
// which are exactly the two terms that overlap at output time k. out_valid is high
// for these N-L samples of every frame. The delay taps the registered output 1, so at
// every sample the RAM takes the previous sample and out2 is out1 of L samples ago.
// Interface: in_valid/in_idx/din from the inverse FFT; all outputs registered, one
// clock later. A direct path and a path through a 256-sample delay follow the
// submatrix figure of the reference design; its addressable delay chains, which
// rearrange the matrix in the block-diagram model, reduce here to the stream order
// itself, which already is the required order.
module submatrix
  import ss_pkg::*;
#(
  parameter int unsigned W = SPEC_W,
  parameter int unsigned N = N_FFT,
  parameter int unsigned L = HOP
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [$clog2(N)-1:0]    in_idx,
  input  logic signed [W-1:0]     din,
  output logic                    out_valid,
  output logic [$clog2(N)-1:0]    out_idx,
  output logic signed [W-1:0]     out1,
  output logic signed [W-1:0]     out2
);
  logic [W-1:0] dly;

  ram_delay #(.W(W), .D(L)) u_dly (
    .clk (clk), .rst_n (rst_n), .en (in_valid), .din (out1), .dout (dly)
  );

  assign out2 = signed'(dly);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_idx <= '0; out1 <= '0;
    end else begin
      out_valid <= in_valid && (in_idx < ($clog2(N))'(N - L));
      if (in_valid) begin
        out_idx <= in_idx;
        out1    <= din;
      end
    end
  end
endmodule
