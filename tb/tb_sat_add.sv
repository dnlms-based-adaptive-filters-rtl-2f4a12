// tb_sat_add - checks the saturating adder/subtractor. Random and corner
// operands for: energy addition (12,7)+(8,7)->(12,7), error subtraction
// (8,7)-(8,7)->(8,7) including -128 operands, and a mixed-format sum
// (10,3)+(8,6)->(9,4) that needs alignment, truncation and saturation.
// Results are compared with an integer model.
`timescale 1ns/1ps
module tb_sat_add;
  import dnlms_ref_pkg::*;
  logic signed [11:0] a1; logic signed [7:0] b1; logic signed [11:0] c1;
  logic signed [7:0]  a2; logic signed [7:0] b2; logic signed [7:0]  c2;
  logic signed [9:0]  a3; logic signed [7:0] b3; logic signed [8:0]  c3;
  sat_add #(.AW(12), .AF(7), .BW(8), .BF(7), .CW(12), .CF(7)) u1 (.a(a1), .b(b1), .c(c1));
  sat_add #(.AW(8), .AF(7), .BW(8), .BF(7), .CW(8), .CF(7), .SUB(1'b1)) u2 (.a(a2), .b(b2), .c(c2));
  sat_add #(.AW(10), .AF(3), .BW(8), .BF(6), .CW(9), .CF(4)) u3 (.a(a3), .b(b3), .c(c3));
  int checks = 0, failures = 0, sats = 0;
  task automatic check(input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("got %0d exp %0d", got, exp); end
  endtask
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    longint v;
    for (int k = 0; k < 3000; k++) begin
      a1 = 12'($urandom); b1 = 8'($urandom);
      a2 = 8'($urandom);  b2 = 8'($urandom);
      if (k == 0) begin a2 = 8'sd0; b2 = -8'sd128; end
      if (k == 1) begin a2 = 8'sd127; b2 = -8'sd1; end
      if (k == 2) begin a1 = 12'sd2047; b1 = 8'sd127; end
      a3 = 10'($urandom); b3 = 8'($urandom);
      #1;
      v = longint'(a1) + longint'(b1);
      if (v > 2047 || v < -2048) sats++;
      check(c1, clamp(v, 12));
      v = longint'(a2) - longint'(b2);
      if (v > 127 || v < -128) sats++;
      check(c2, clamp(v, 8));
      // align to 6 fractional bits, then keep 4
      v = (longint'(a3) * 8 + longint'(b3)) >>> 2;
      check(c3, clamp(v, 9));
    end
    checks++; if (sats == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
