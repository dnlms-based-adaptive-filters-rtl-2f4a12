// tb_regressor_energy - checks the recursive regressor energy. A window of
// 20 samples is slid over a random signal: x_new is the entering sample and
// x_old the one leaving 20 clocks later. The output must equal the integer
// model beta + sum of the truncated squares in the window (saturated at
// each step), starting from beta after reset. A second phase with
// full-scale samples drives the 12-bit energy into saturation.
`timescale 1ns/1ps
module tb_regressor_energy;
  import dnlms_ref_pkg::*;
  localparam int WIN = 20;
  logic clk = 1'b0, rst;
  always #5 clk = ~clk;
  logic signed [7:0]  x_new, x_old;
  logic signed [11:0] beta = 12'sd8, energy;
  regressor_energy dut (.clk, .rst, .x_new, .x_old, .beta, .energy);
  int checks = 0, failures = 0, sats = 0;
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    longint win [$];
    longint ed, exp_e;
    ed = 8;
    for (int c = 0; c < 1200; c++) begin
      @(negedge clk);
      rst = (c < 2);
      if (c >= 600 && c < 800) x_new = (c % 2) ? -8'sd128 : 8'sd127;
      else x_new = 8'(gauss8());
      win.push_front(x_new);
      x_old = (win.size() > WIN) ? 8'(win[WIN]) : 8'sd0;
      if (win.size() > WIN + 1) void'(win.pop_back());
      #1;
      exp_e = clamp(clamp(ed - qmul(x_old, x_old, 7, 8), 12) + qmul(x_new, x_new, 7, 8), 12);
      if (clamp(ed - qmul(x_old, x_old, 7, 8), 12) + qmul(x_new, x_new, 7, 8) > 2047) sats++;
      if (!rst) begin
        checks++;
        if (energy != exp_e) begin
          failures++;
          if (failures < 10) $display("cycle %0d energy %0d expected %0d", c, energy, exp_e);
        end
      end
      ed = rst ? 8 : exp_e;
      if (rst) win.delete();
    end
    checks++; if (sats == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
