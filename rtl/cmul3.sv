// cmul3: complex multiplication (a + jb)(c + jd) with three real multipliers.
//
//   k1 = c (a + b),  k2 = a (d - c),  k3 = b (c + d)
//   re = k1 - k3 = ac - bd,  im = k1 + k2 = ad + bc
//
// (a, b) is a data word of DW bits; (c, d) is a coefficient of CW bits with FRAC
// fractional bits. Both products are shifted right by FRAC (rounding toward minus
// infinity) and returned at DW bits, so |coefficient| <= 1 keeps the data range.
// Purely combinational. The three-multiplier form is the structure the reference
// design names for its transforms; the widths and the rounding are this design's own.
module cmul3 #(
  parameter int unsigned DW   = 28,
  parameter int unsigned CW   = 18,
  parameter int unsigned FRAC = 16
) (
  input  logic signed [DW-1:0] a,
  input  logic signed [DW-1:0] b,
  input  logic signed [CW-1:0] c,
  input  logic signed [CW-1:0] d,
  output logic signed [DW-1:0] re,
  output logic signed [DW-1:0] im
);
  localparam int unsigned PW = DW + CW + 2;

  logic signed [PW-1:0] k1, k2, k3, pre, pim;

  always_comb begin
    k1  = PW'(c) * (PW'(a) + PW'(b));
    k2  = PW'(a) * (PW'(d) - PW'(c));
    k3  = PW'(b) * (PW'(c) + PW'(d));
    pre = k1 - k3;
    pim = k1 + k2;
    re  = DW'(pre >>> FRAC);
    im  = DW'(pim >>> FRAC);
  end
endmodule
