// tb_delay_line - checks the tapped shift register: after every clock, tap
// k must hold the input of k+1 clocks earlier (zero if that was before the
// last reset). A 5-tap, 8-bit line is driven with random data and reset
// twice. A one-tap line runs alongside and must track tap 0.
`timescale 1ns/1ps
module tb_delay_line;
  localparam int LEN = 5;
  logic clk = 1'b0, rst;
  always #5 clk = ~clk;
  logic signed [7:0] d;
  logic signed [7:0] q [LEN];
  logic signed [7:0] q0 [1];
  delay_line #(.W(8), .LEN(LEN)) dut (.clk, .rst, .d, .q);
  delay_line #(.W(8), .LEN(1)) dut0 (.clk, .rst, .d, .q(q0));
  int checks = 0, failures = 0;
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic signed [7:0] hist [$];
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      if (c > 0)
        for (int k = 0; k < LEN; k++) begin
          checks++;
          if (q[k] != ((k < hist.size()) ? hist[k] : 8'sd0)) begin
            failures++;
            if (failures < 10) $display("cycle %0d tap %0d: %0d", c, k, q[k]);
          end
        end
      if (c > 0) begin
        checks++;
        if (q0[0] != q[0]) failures++;
      end
      rst = (c < 2) || (c == 150);
      d = 8'($urandom);
      if (rst) hist.delete();
      else hist.push_front(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
