// gain_estimator: spectral-subtraction gain of one frequency bin,
//   Q = |X1|^2 / |D|^2,   Q := 1 when Q < 1 (amplitude limiter),
//   G = sqrt(1 - 1/Q)  =  sqrt(1 - |D|^2/|X1|^2) for Q >= 1, else 0.
//
// The chain follows the gain-estimator diagram of the reference design: two squarers
// and an adder form |X1|^2, a divider forms Q, a comparator against 1 drives a
// multiplexer that substitutes 1 for Q < 1, a second divider forms 1/Q, a subtractor
// forms 1 - 1/Q and a square root gives G. Number formats (this design's choice):
//   Q   : unsigned Q16.16 (32 bits), saturating at 65536 - 2^-16, and when |D|^2 = 0
//   1/Q : unsigned Q1.16, 1 - 1/Q : unsigned Q0.16
//   G   : unsigned Q0.16 (GAIN_W bits), G = floor(sqrt((1 - 1/Q) * 2^32))
// The dividers and the square root are pipelined (udiv_pipe, usqrt_pipe); the
// reference design uses vendor CORDIC cores there.
//
// Interface: re/im (bin of the speech channel) and dpow (noise power of the same bin)
// enter together with in_valid; g, out_valid and limited (the limiter replaced Q by 1)
// leave LAT clocks later. A new bin may enter every clock.
module gain_estimator
  import ss_pkg::*;
#(
  parameter int unsigned W  = SPEC_W,
  parameter int unsigned DW = 2 * SPEC_W + BETA_W + 1,
  parameter int unsigned GW = GAIN_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  re,
  input  logic signed [W-1:0]  im,
  input  logic [DW-1:0]        dpow,
  output logic                 out_valid,
  output logic [GW-1:0]        g,
  output logic                 limited
);
  localparam int unsigned PW   = 2 * W + 1;
  localparam int unsigned QW   = 2 * GW;      // Q16.16
  localparam int unsigned RW   = GW + 1;      // Q1.16
  localparam int unsigned LAT_Q   = 1 + (QW + 1);
  localparam int unsigned LAT_R   = RW + 1;
  localparam int unsigned LAT_S   = GW + 1;
  localparam int unsigned LAT     = LAT_Q + 1 + LAT_R + 1 + LAT_S;

  // |X1|^2
  logic [PW-1:0] p1;
  logic [DW-1:0] d_r;
  logic          p_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1 <= '0; d_r <= '0; p_valid <= 1'b0;
    end else begin
      p1      <= unsigned'(PW'(re) * PW'(re) + PW'(im) * PW'(im));
      d_r     <= dpow;
      p_valid <= in_valid;
    end
  end

  // Q = |X1|^2 / |D|^2
  logic [QW-1:0] q;
  logic          q_valid;

  udiv_pipe #(.AW(PW), .BW(DW), .F(GW), .QW(QW)) u_div_q (
    .clk (clk), .rst_n (rst_n), .in_valid (p_valid), .a (p1), .b (d_r),
    .out_valid (q_valid), .q (q)
  );

  // Amplitude limiter: comparator Q >= 1 selects Q, otherwise the constant 1.
  localparam logic [QW-1:0] ONE_Q = QW'(1) << GW;
  logic [QW-1:0] qc;
  logic          qc_valid, qc_lim;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qc <= ONE_Q; qc_valid <= 1'b0; qc_lim <= 1'b0;
    end else begin
      qc       <= (q >= ONE_Q) ? q : ONE_Q;
      qc_lim   <= (q < ONE_Q);
      qc_valid <= q_valid;
    end
  end

  // 1/Q
  logic [RW-1:0] rq;
  logic          rq_valid;

  udiv_pipe #(.AW(1), .BW(QW), .F(QW), .QW(RW)) u_div_r (
    .clk (clk), .rst_n (rst_n), .in_valid (qc_valid), .a (1'b1), .b (qc),
    .out_valid (rq_valid), .q (rq)
  );

  // 1 - 1/Q
  localparam logic [RW-1:0] ONE_R = RW'(1) << GW;
  logic [GW-1:0] s;
  logic          s_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= '0; s_valid <= 1'b0;
    end else begin
      s       <= (rq >= ONE_R) ? '0 : GW'(ONE_R - rq);
      s_valid <= rq_valid;
    end
  end

  // G = sqrt(1 - 1/Q)
  usqrt_pipe #(.XW(2 * GW)) u_sqrt (
    .clk (clk), .rst_n (rst_n), .in_valid (s_valid), .x ({s, GW'(0)}),
    .out_valid (out_valid), .r (g)
  );

  // The limiter flag travels beside the 1/Q, subtract and square-root stages.
  pipe_delay #(.W(1), .DEPTH(LAT_R + 1 + LAT_S)) u_lim_dly (
    .clk (clk), .din (qc_lim), .dout (limited)
  );
endmodule
