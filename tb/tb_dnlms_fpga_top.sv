// tb_dnlms_fpga_top - end-to-end test of the FPGA test system at its
// default parameters (11212 samples, N = 96, P = 3, D = 32, alpha = 0.125,
// beta = 0.0625, board clock divided by 2).
//
// The host port fills the x and d sample memories with an echo-cancellation
// signal: Gaussian-like far-end noise, its echo through a fixed 64-tap echo
// path, a little near-end noise and a few loud near-end bursts. The start
// button then runs the whole signal through the filter. Every e and y word
// read back through the host port must equal the integer reference model
// of dnlms_ref_pkg. The pass must take NUM_INPUTS + 3 filter clocks (two
// board clocks each, give or take the synchronisers), the echo must be
// cancelled by more than 10 dB at the end, and a second pass, started
// after a reset of the controller, must reproduce the first bit for bit
// (the filter restarts from reset on every pass). The host then loads the
// step-size table for alpha = 0.5 (the white-noise setting) and a third
// pass must match the reference model with that alpha. With this larger step
// the filter must converge faster: over samples 600-999 the echo must be
// cancelled by at least 7 dB and by 2 dB more than with alpha = 0.125 (the
// original design reached steady state on white noise within about 600
// samples at alpha = 0.5). Counted mechanisms: filter
// held in reset while idle, drain of the write pipeline, error
// saturation, weight adaptation, more than one step size from the division
// table, and the table reload.
`timescale 1ns/1ps
module tb_dnlms_fpga_top;
  import dnlms_pkg::*;
  import dnlms_ref_pkg::*;

  localparam int NUM = 11212;
  localparam int ECHO_LEN = 64;

  logic clk = 1'b0;
  always #10 clk = ~clk;   // 50 MHz board clock

  logic reset_n, start, host_wr_x, host_wr_d, host_wr_lut, busy, done;
  logic [13:0] host_addr, host_raddr;
  logic [7:0]  host_wdata, host_y, host_e;
  logic [10:0] host_lut_wdata;

  dnlms_fpga_top dut (
    .clk, .reset_n, .start, .host_wr_x, .host_wr_d, .host_addr, .host_wdata,
    .host_wr_lut, .host_lut_wdata,
    .host_raddr, .host_y, .host_e, .busy, .done
  );

  int checks = 0, failures = 0;
  int n_idle_rst = 0, n_drain = 0, n_sat = 0, n_adapt = 0;
  int mu_seen [int];

  task automatic check(input string s, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", s, got, exp);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled on the filter clock
  always @(posedge dut.clk_f) begin
    if (!dut.busy_f && dut.filt_rst) n_idle_rst++;
    if (dut.busy_f && !dut.rd_en && dut.wr_en) n_drain++;
    if (!dut.filt_rst) mu_seen[int'(dut.mu)] = 1;
  end

  longint xs [NUM], ds [NUM], ye [NUM], ee [NUM], ye5 [NUM], ee5 [NUM];
  int n_reload = 0;
  logic [7:0] e_run1 [NUM];

  task automatic run_pass(input int pass, output int cycles);
    int c;
    @(negedge clk) start = 1'b1;
    c = 0;
    while (!busy) begin @(posedge clk); c++; end
    @(negedge clk) start = 1'b0;
    while (!done) begin @(posedge clk); c++; end
    cycles = c;
    $display("pass %0d: %0d board clocks", pass, c);
  endtask

  initial begin
    longint xh [ECHO_LEN];
    longint acc;
    int cycles;
    real pe, pd, pe0, pd0, early1;
    dnlms_model m;

    reset_n = 1'b0; start = 1'b0; host_wr_x = 1'b0; host_wr_d = 1'b0;
    host_wr_lut = 1'b0; host_lut_wdata = '0;
    host_addr = '0; host_wdata = '0; host_raddr = '0;

    // signal and reference
    foreach (xh[k]) xh[k] = 0;
    for (int n = 0; n < NUM; n++) begin
      for (int k = ECHO_LEN - 1; k > 0; k--) xh[k] = xh[k-1];
      xh[0] = gauss8();
      acc = 0;
      for (int k = 0; k < ECHO_LEN; k++) acc += echo_tap(k, ECHO_LEN) * xh[k];
      xs[n] = xh[0];
      ds[n] = clamp((acc >>> 15) + longint'($urandom_range(4)) - 2, 8);
      if (n < 8000 && n % 1000 >= 500 && n % 1000 < 510) ds[n] = (acc >= 0) ? -128 : 127;
    end
    m = new(96, 3, 32, 4096, 8);
    m.clock(1'b1, 0, 0);                   // the filter leaves reset with mu(beta)
    for (int n = 0; n < NUM; n++) begin
      m.clock(1'b0, xs[n], ds[n]);
      m.eval(1'b0);
      ye[n] = m.y; ee[n] = m.e;
      if (m.d1 - m.y > 127 || m.d1 - m.y < -128) n_sat++;
      if (m.ue_pe[0] != 0) n_adapt++;
    end
    m = new(96, 3, 32, 16384, 8);
    m.clock(1'b1, 0, 0);
    for (int n = 0; n < NUM; n++) begin
      m.clock(1'b0, xs[n], ds[n]);
      m.eval(1'b0);
      ye5[n] = m.y; ee5[n] = m.e;
    end

    // load the sample memories
    repeat (4) @(posedge clk);
    for (int n = 0; n < NUM; n++) begin
      @(negedge clk);
      host_wr_x = 1'b1; host_wr_d = 1'b0; host_addr = 14'(n); host_wdata = 8'(xs[n]);
      @(negedge clk);
      host_wr_x = 1'b0; host_wr_d = 1'b1; host_wdata = 8'(ds[n]);
    end
    @(negedge clk); host_wr_x = 1'b0; host_wr_d = 1'b0;
    reset_n = 1'b1;
    repeat (20) @(posedge clk);

    for (int pass = 1; pass <= 3; pass++) begin
      if (pass == 3) begin
        // load the alpha = 0.5 step-size table through the host port
        for (int a = 0; a < 4096; a++) begin
          @(negedge clk);
          host_wr_lut = 1'b1; host_addr = 14'(a);
          host_lut_wdata = 11'(lut_mu(longint'($signed(12'(a))), 16384));
          n_reload++;
        end
        @(negedge clk) host_wr_lut = 1'b0;
      end
      run_pass(pass, cycles);
      checks++;
      if (cycles < 2 * (NUM + 3) || cycles > 2 * (NUM + 3) + 16) begin
        failures++;
        $display("pass took %0d board clocks, expected about %0d", cycles, 2 * (NUM + 3));
      end
      pe = 0.0; pd = 0.0; pe0 = 0.0; pd0 = 0.0;
      for (int n = 0; n < NUM; n++) begin
        @(negedge clk) host_raddr = 14'(n);
        @(negedge clk);
        check($sformatf("pass %0d y[%0d]", pass, n), longint'($signed(host_y)), (pass == 3) ? ye5[n] : ye[n]);
        check($sformatf("pass %0d e[%0d]", pass, n), longint'($signed(host_e)), (pass == 3) ? ee5[n] : ee[n]);
        if (pass == 1) e_run1[n] = host_e;
        else if (pass == 2) check($sformatf("repeat e[%0d]", n), host_e, e_run1[n]);
        if (n >= 600 && n < 1000) begin
          pe0 += real'($signed(host_e)) ** 2;
          pd0 += real'(ds[n]) ** 2;
        end
        if (n >= NUM - 2000) begin
          pe += real'($signed(host_e)) ** 2;
          pd += real'(ds[n]) ** 2;
        end
      end
      $display("pass %0d: ERLE over the last 2000 samples %0.1f dB", pass, 10.0 * $log10(pd / pe));
      checks++;
      if (10.0 * $log10(pd / pe) < 10.0) failures++;
      $display("pass %0d: ERLE over samples 600-999 %0.1f dB", pass, 10.0 * $log10(pd0 / pe0));
      if (pass == 1) early1 = 10.0 * $log10(pd0 / pe0);
      if (pass == 3) begin
        // the larger step must have converged clearly faster by sample 600
        checks++;
        if (10.0 * $log10(pd0 / pe0) < 7.0 || 10.0 * $log10(pd0 / pe0) < early1 + 2.0) failures++;
      end
      if (pass == 1) begin
        // a reset of the controller between the passes
        @(negedge clk) reset_n = 1'b0;
        repeat (10) @(posedge clk);
        @(negedge clk) reset_n = 1'b1;
        repeat (10) @(posedge clk);
      end
    end

    $display("filter held in reset while idle: %0d clocks, drain clocks: %0d", n_idle_rst, n_drain);
    $display("error saturations: %0d, adapting samples: %0d, step sizes used: %0d",
             n_sat, n_adapt, mu_seen.num());
    checks++; if (n_idle_rst == 0) failures++;
    checks++; if (n_drain == 0) failures++;
    checks++; if (n_sat == 0) failures++;
    checks++; if (n_adapt == 0) failures++;
    checks++; if (mu_seen.num() < 2) failures++;
    checks++; if (n_reload == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
