// tb_sat_trunc - checks format conversion with truncation and saturation.
// Three conversions are driven with random and corner codes and compared
// with an integer model (arithmetic shift for floor, clamp for saturation):
// (16,15)->(8,7) drops LSBs only, (20,10)->(8,4) drops LSBs and saturates,
// (8,4)->(12,6) appends zero LSBs and sign-extends.
`timescale 1ns/1ps
module tb_sat_trunc;
  import dnlms_ref_pkg::*;
  logic signed [15:0] a1; logic signed [7:0]  c1;
  logic signed [19:0] a2; logic signed [7:0]  c2;
  logic signed [7:0]  a3; logic signed [11:0] c3;
  sat_trunc #(.IW(16), .IF(15), .OW(8),  .OF(7)) u1 (.a(a1), .c(c1));
  sat_trunc #(.IW(20), .IF(10), .OW(8),  .OF(4)) u2 (.a(a2), .c(c2));
  sat_trunc #(.IW(8),  .IF(4),  .OW(12), .OF(6)) u3 (.a(a3), .c(c3));
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
      a1 = 16'($urandom); a2 = 20'($urandom);
      if (k < 4) a2 = (k == 0) ? 20'h7FFFF : (k == 1) ? 20'h80000 : (k == 2) ? 20'h007FF : 20'hFF800;
      a3 = 8'($urandom);
      #1;
      check(c1, longint'(a1) >>> 8);
      v = longint'(a2) >>> 6;
      if (v > 127 || v < -128) sats++;
      check(c2, clamp(v, 8));
      check(c3, longint'(a3) <<< 2);
    end
    checks++; if (sats == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
