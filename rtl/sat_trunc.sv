// sat_trunc - change the format of a signed fixed-point word, truncating
// and saturating.
//
// The input `a` is an (IW, IF) word and the output `c` an (OW, OF) word
// (total bits including sign, fractional bits). Fractional bits beyond OF
// are dropped, which rounds toward minus infinity; if OF > IF zeros are
// appended. If the value does not fit the integer range of the output it
// is clamped to the most positive or most negative output code. Purely
// combinational. Truncation and saturation are the arithmetic rules of the
// filter; this module is the one place they are written.
module sat_trunc #(
  parameter int unsigned IW = 19,   // defaults: the mu*e product,
  parameter int unsigned IF = 14,   // (11,7) x (8,7) into (13,12)
  parameter int unsigned OW = 13,
  parameter int unsigned OF = 12
) (
  input  logic signed [IW-1:0] a,
  output logic signed [OW-1:0] c
);
  // shift applied to line up the binary points (positive: drop LSBs)
  localparam int SH = int'(IF) - int'(OF);
  // width of the word once its binary point matches the output
  localparam int TW = int'(IW) - SH;

  logic signed [TW-1:0] t;

  if (SH >= 0) begin : g_drop
    assign t = a[IW-1:SH];
  end else begin : g_pad
    assign t = {a, {(-SH){1'b0}}};
  end

  if (TW > int'(OW)) begin : g_sat
    // overflow when the bits above the output sign are not all copies of it
    logic ovf;
    assign ovf = (t[TW-1:OW-1] != {(TW-OW+1){1'b0}}) &&
                 (t[TW-1:OW-1] != {(TW-OW+1){1'b1}});
    assign c = ovf ? {t[TW-1], {(OW-1){~t[TW-1]}}} : t[OW-1:0];
  end else begin : g_ext
    assign c = OW'(t);
  end
endmodule
