// tb_dnlms_pe - checks one processing element of P = 3 weights. Random
// regressor samples, delayed samples, partial sums and mu*e products are
// applied every clock; a_out is compared with a_in + sum of x*w (each step
// truncated and saturated in (16,15)) and the weights with the integer
// update w += x_d * ue, both from an integer model of the element. Large
// ue values push the weights into saturation.
`timescale 1ns/1ps
module tb_dnlms_pe;
  import dnlms_pkg::*;
  import dnlms_ref_pkg::*;
  localparam int P = 3;
  logic clk = 1'b0, rst;
  always #5 clk = ~clk;
  logic signed [X_W-1:0]  x_in [P], xd_in [P];
  logic signed [A_W-1:0]  a_in, a_out;
  logic signed [UE_W-1:0] ue_in;
  logic signed [W_W-1:0]  w [P];
  dnlms_pe #(.P(P)) dut (.clk, .rst, .x_in, .xd_in, .a_in, .ue_in, .a_out, .w);
  int checks = 0, failures = 0, wsat = 0;
  task automatic check(input string s, input longint got, input longint exp, input int c);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("cycle %0d %s got %0d exp %0d", c, s, got, exp); end
  endtask
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    longint wm [P];
    longint s;
    foreach (wm[j]) wm[j] = 0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      rst = (c < 2);
      foreach (x_in[j]) begin x_in[j] = 8'($urandom); xd_in[j] = 8'($urandom); end
      a_in  = 16'($urandom) >>> 2;
      ue_in = (c > 1000 && c < 1100) ? 13'sd4095 : 13'($signed(13'($urandom)) >>> 4);
      #1;
      if (!rst) begin
        s = a_in;
        for (int j = P - 1; j >= 0; j--) s = clamp(s + qmul(x_in[j], wm[j], 9, 16), 16);
        check("a_out", a_out, s, c);
        foreach (w[j]) check("w", w[j], wm[j], c);
      end
      for (int j = 0; j < P; j++) begin
        if (rst) wm[j] = 0;
        else begin
          s = wm[j] + qmul(xd_in[j], ue_in, 2, 18);
          if (s > 131071 || s < -131072) wsat++;
          wm[j] = clamp(s, 18);
        end
      end
    end
    checks++; if (wsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
