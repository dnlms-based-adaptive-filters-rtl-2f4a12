// tb_sat_mult - checks the saturating multiplier in the three formats the
// filter uses: x*w (8,7)x(18,17)->(16,15), mu*e (11,7)x(8,7)->(13,12) and
// x^2 (8,7)x(8,7)->(8,7), including the (-1)*(-1) overflow. Results are
// compared with an integer model (full product, arithmetic shift, clamp).
`timescale 1ns/1ps
module tb_sat_mult;
  import dnlms_ref_pkg::*;
  logic signed [7:0]  a1; logic signed [17:0] b1; logic signed [15:0] c1;
  logic signed [10:0] a2; logic signed [7:0]  b2; logic signed [12:0] c2;
  logic signed [7:0]  a3; logic signed [7:0]  c3;
  sat_mult #(.AW(8),  .AF(7), .BW(18), .BF(17), .CW(16), .CF(15)) u1 (.a(a1), .b(b1), .c(c1));
  sat_mult #(.AW(11), .AF(7), .BW(8),  .BF(7),  .CW(13), .CF(12)) u2 (.a(a2), .b(b2), .c(c2));
  sat_mult #(.AW(8),  .AF(7), .BW(8),  .BF(7),  .CW(8),  .CF(7))  u3 (.a(a3), .b(a3), .c(c3));
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
      a1 = 8'($urandom); b1 = 18'($urandom);
      a2 = 11'($urandom); b2 = 8'($urandom);
      a3 = (k < 256) ? 8'(k) : 8'($urandom);
      if (k == 0) begin a1 = -8'sd128; b1 = -18'sd131072; end
      #1;
      check(c1, qmul(a1, b1, 9, 16));
      v = (longint'(a2) * longint'(b2)) >>> 2;
      if (v > 4095 || v < -4096) sats++;
      check(c2, clamp(v, 13));
      check(c3, qmul(a3, a3, 7, 8));
    end
    checks++; if (sats == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
