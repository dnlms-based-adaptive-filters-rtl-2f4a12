// tb_hybrid_test_fsm - checks the test controller with NUM = 20. Every
// clock it compares the outputs with what the previous clocks imply: the
// filter reset is the registered "idle" state, the write enable and address
// are the read enable and address two clocks late, reads cover addresses
// 0..NUM-1 once per pass in order, and done rises exactly NUM+3 clocks
// after the start edge is taken. A start held high must not start a second
// pass; a reset in the middle of a pass must return the controller to idle.
`timescale 1ns/1ps
module tb_hybrid_test_fsm;
  localparam int NUM = 20;
  localparam int AW  = 5;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, start, filt_rst, rd_en, wr_en, busy, done;
  logic [AW-1:0] rd_addr, wr_addr;
  hybrid_test_fsm #(.NUM(NUM), .AW(AW)) dut (
    .clk, .rst_n, .start, .filt_rst, .rd_en, .rd_addr, .wr_en, .wr_addr, .busy, .done
  );
  int checks = 0, failures = 0;
  int passes = 0, drains = 0, aborts = 0;
  task automatic check(input string s, input bit ok, input int c);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("cycle %0d: %s", c, s); end
  endtask
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic          rd_en_h [3];
    logic [AW-1:0] rd_addr_h [3];
    logic          busy_h;
    int next_addr, start_cycle, c;
    rd_en_h = '{default: 1'b0}; rd_addr_h = '{default: '0}; busy_h = 1'b0;
    next_addr = 0; start_cycle = -1;
    for (c = 0; c < 400; c++) begin
      @(negedge clk);
      // start pulses at 10, 180, 205 and 260 and a start held high from 60
      // to 150 (one pass only); a reset at 190 aborts the pass from 180
      if (c > 0 && !rst_n) check("reset returns to idle", !busy && !rd_en && filt_rst, c);
      rst_n = !(c < 2 || c == 190);
      start = (c == 10) || (c >= 60 && c < 150) || (c == 180) || (c == 205) || (c == 260);
      if (c > 2) begin
        if (c != 190 && c != 191) check("filter reset follows idle", filt_rst == !busy_h, c);
        // the write pipeline is cleared by a reset
        if (c > 192 || c < 190) begin
          check("write enable delayed", wr_en == rd_en_h[1], c);
          if (wr_en) check("write address delayed", wr_addr == rd_addr_h[1], c);
        end
        if (rd_en) begin
          check("read address order", rd_addr == AW'(next_addr), c);
          next_addr++;
        end
        if (busy && !busy_h) start_cycle = c;
        if (done && busy_h && !busy) begin
          passes++;
          check("pass length", c - start_cycle == NUM + 3, c);
          check("all samples read", next_addr == NUM, c);
        end
        if (busy && !rd_en && !done) drains++;
        if (!rst_n && busy) aborts++;
        if (!busy) next_addr = 0;
      end
      rd_en_h[1] = rd_en_h[0]; rd_en_h[0] = rd_en;
      rd_addr_h[1] = rd_addr_h[0]; rd_addr_h[0] = rd_addr;
      busy_h = busy;
    end
    check("number of complete passes", passes == 4, c);
    check("drain and abort seen", drains > 0 && aborts > 0, c);
    $display("passes %0d aborts %0d", passes, aborts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
