// sat_mult - saturating fixed-point multiplier.
//
// c = a * b, where a is (AW, AF), b is (BW, BF) and c is (CW, CF). The full
// AW+BW bit product (AF+BF fractional bits) is formed first; sat_trunc then
// drops the surplus fractional bits (rounding toward minus infinity) and
// clamps an overflow, such as (-1)*(-1) into a format without integer bits,
// to the largest output code. Combinational.
module sat_mult #(
  parameter int unsigned AW = 8,
  parameter int unsigned AF = 7,
  parameter int unsigned BW = 18,
  parameter int unsigned BF = 17,
  parameter int unsigned CW = 16,
  parameter int unsigned CF = 15
) (
  input  logic signed [AW-1:0] a,
  input  logic signed [BW-1:0] b,
  output logic signed [CW-1:0] c
);
  localparam int unsigned PW = AW + BW;

  logic signed [PW-1:0] prod;

  assign prod = PW'(a) * PW'(b);

  sat_trunc #(.IW(PW), .IF(AF + BF), .OW(CW), .OF(CF)) u_fmt (.a(prod), .c(c));
endmodule
