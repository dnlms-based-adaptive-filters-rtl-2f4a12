// sat_add - saturating fixed-point adder.
//
// c = a + b, where a is (AW, AF), b is (BW, BF) and c is (CW, CF). The two
// operands are aligned to the finer binary point and added at full
// precision, then sat_trunc drops the surplus fractional bits (rounding
// toward minus infinity) and clamps an overflow to the largest positive or
// negative output. Set SUB to 1 to compute a - b instead (the full-precision
// difference cannot wrap, so -(-1) is handled correctly). Combinational.
module sat_add #(
  parameter int unsigned AW = 12,
  parameter int unsigned AF = 7,
  parameter int unsigned BW = 8,
  parameter int unsigned BF = 7,
  parameter int unsigned CW = 12,
  parameter int unsigned CF = 7,
  parameter bit          SUB = 1'b0
) (
  input  logic signed [AW-1:0] a,
  input  logic signed [BW-1:0] b,
  output logic signed [CW-1:0] c
);
  localparam int unsigned F  = (AF > BF) ? AF : BF;
  localparam int unsigned AI = AW - AF;          // integer bits incl. sign
  localparam int unsigned BI = BW - BF;
  localparam int unsigned SW = ((AI > BI) ? AI : BI) + 1 + F;

  logic signed [SW-1:0] sa, sb, sum;

  assign sa  = SW'(a) <<< (F - AF);
  assign sb  = SW'(b) <<< (F - BF);
  assign sum = SUB ? sa - sb : sa + sb;

  sat_trunc #(.IW(SW), .IF(F), .OW(CW), .OF(CF)) u_fmt (.a(sum), .c(c));
endmodule
