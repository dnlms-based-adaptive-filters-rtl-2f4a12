// tb_clk_divider - checks the clock divider for DIV = 2 and DIV = 6: after
// a settling time, every high and every low phase of the output must last
// exactly DIV/2 input clock periods.
`timescale 1ns/1ps
module tb_clk_divider;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic out2, out6;
  clk_divider                u2 (.clk_in(clk), .clk_out(out2));
  clk_divider #(.DIV(6))     u6 (.clk_in(clk), .clk_out(out6));
  int checks = 0, failures = 0;
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic p2, p6;
    int run2, run6, edges2, edges6;
    run2 = 0; run6 = 0; edges2 = 0; edges6 = 0;
    repeat (10) @(posedge clk);
    #1 p2 = out2; p6 = out6;
    for (int c = 0; c < 600; c++) begin
      @(posedge clk); #1;
      run2++; run6++;
      if (out2 != p2) begin
        if (edges2 > 0) begin checks++; if (run2 != 1) failures++; end
        edges2++; run2 = 0; p2 = out2;
      end
      if (out6 != p6) begin
        if (edges6 > 0) begin checks++; if (run6 != 3) begin failures++; $display("DIV=6 phase of %0d", run6); end end
        edges6++; run6 = 0; p6 = out6;
      end
    end
    checks++; if (edges6 < 150 || edges2 < 500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
