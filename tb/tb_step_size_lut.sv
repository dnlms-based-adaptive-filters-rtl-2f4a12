// tb_step_size_lut - reads every address of two step-size tables (alpha =
// 0.125 and alpha = 0.5) and compares each word, one clock after its
// address, with floor(alpha / energy) computed on the integer codes and
// saturated to the largest (11,7) step. Both the saturated and the
// unsaturated range of the table are reached. Then the alpha = 0.125 table
// is overwritten through the write port (on a clock of its own) with the
// alpha = 0.5 table, and read back again.
`timescale 1ns/1ps
module tb_step_size_lut;
  import dnlms_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic wclk = 1'b0;
  always #3 wclk = ~wclk;
  logic [11:0] addr, waddr;
  logic [10:0] mu_a, mu_b, wdata;
  logic        we;
  step_size_lut #(.ALPHA(4096))  u_a (.clk, .addr, .mu(mu_a), .wclk, .we, .waddr, .wdata);
  step_size_lut #(.ALPHA(16384)) u_b (.clk, .addr, .mu(mu_b), .wclk, .we(1'b0), .waddr, .wdata);
  int checks = 0, failures = 0, sat = 0, unsat = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    longint en;
    we = 1'b0; waddr = '0; wdata = '0;
    for (int a = 0; a <= 4096; a++) begin
      @(negedge clk);
      if (a > 0) begin
        en = longint'($signed(12'(a - 1)));
        checks += 2;
        if (mu_a != 11'(lut_mu(en, 4096)) || mu_b != 11'(lut_mu(en, 16384))) begin
          failures++;
          if (failures < 10) $display("addr %0d: %0d %0d", a - 1, mu_a, mu_b);
        end
        if (lut_mu(en, 16384) == 1023) sat++; else if (en > 0) unsat++;
      end
      addr = 12'(a);
    end
    checks++; if (sat == 0 || unsat == 0) failures++;
    for (int a = 0; a < 4096; a++) begin
      @(negedge wclk); we = 1'b1; waddr = 12'(a); wdata = 11'(lut_mu(longint'($signed(12'(a))), 16384));
    end
    @(negedge wclk); we = 1'b0;
    for (int a = 0; a <= 4096; a++) begin
      @(negedge clk);
      if (a > 0) begin
        checks++;
        if (mu_a != mu_b) begin
          failures++;
          if (failures < 10) $display("rewritten addr %0d: %0d %0d", a - 1, mu_a, mu_b);
        end
      end
      addr = 12'(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
