// tb_dual_clock_ram - checks the dual-clock memory (DEPTH = 100, 8 bits)
// with a 10 ns write clock and a 14 ns read clock. Random words are written
// to random addresses (some beyond DEPTH, which must be ignored), then every
// address is read back: the data must match a model of the memory one read
// clock after the address, hold while the read enable is low, and be zero
// for addresses beyond DEPTH.
`timescale 1ns/1ps
module tb_dual_clock_ram;
  localparam int DEPTH = 100, AW = 7;
  logic wclk = 1'b0, rclk = 1'b0;
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;
  logic we, re;
  logic [AW-1:0] waddr, raddr;
  logic [7:0] wdata, rdata;
  dual_clock_ram #(.W(8), .DEPTH(DEPTH), .AW(AW)) dut (
    .wclk, .we, .waddr, .wdata, .rclk, .re, .raddr, .rdata
  );
  int checks = 0, failures = 0;
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] model [DEPTH];
    logic [7:0] held;
    we = 1'b0; re = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge wclk); we = 1'b1; waddr = AW'(a); wdata = 8'($urandom); model[a] = wdata;
    end
    for (int k = 0; k < 400; k++) begin
      @(negedge wclk); we = 1'b1; waddr = AW'($urandom_range(127)); wdata = 8'($urandom);
      if (waddr < DEPTH) model[waddr] = wdata;
    end
    @(negedge wclk); we = 1'b0;
    for (int a = 0; a < 128; a++) begin
      @(negedge rclk); re = 1'b1; raddr = AW'(a);
      @(negedge rclk); re = 1'b0; raddr = AW'($urandom);
      checks++;
      if (rdata != ((a < DEPTH) ? model[a] : 8'h00)) begin
        failures++;
        if (failures < 10) $display("addr %0d read %0h expected %0h", a, rdata, model[a]);
      end
      held = rdata;
      @(negedge rclk);
      checks++;
      if (rdata != held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
