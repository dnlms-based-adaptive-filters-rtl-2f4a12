// tb_dnlms_hybrid_filter - self-checking testbench of the hybrid-form DNLMS
// filter.
//
// Two filters run side by side on the same echo-cancellation signal: one
// with its default parameters (N = 96, P = 3, D = 32, alpha = 0.125) and a
// small one with D larger than its minimum (N = 8, P = 2, D = 6,
// alpha = 0.5). The far-end signal is Gaussian-like noise, the desired
// signal its echo through a fixed echo path plus a little near-end noise.
// Every cycle the outputs y, e, the energy, the step size and all weights
// are compared with the integer reference model of dnlms_ref_pkg. The
// filters are reset twice, the second time in the middle of the run, and
// the one-sample latency is checked right after reset. At the end the echo
// return loss enhancement of the full-size filter over the last 1000
// samples must exceed 10 dB.
`timescale 1ns/1ps
module tb_dnlms_hybrid_filter;
  import dnlms_pkg::*;
  import dnlms_ref_pkg::*;

  localparam int SAMPLES = 6000;
  localparam int N1 = 96, P1 = 3, D1 = 32, AL1 = 4096;
  localparam int N2 = 8,  P2 = 2, D2 = 6,  AL2 = 16384;
  localparam int ECHO_LEN = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst;
  logic signed [X_W-1:0]  xin, din;
  logic signed [EN_W-1:0] beta = EN_W'(8);

  logic signed [X_W-1:0]  y1, e1, y2, e2;
  logic signed [EN_W-1:0] en1, en2;
  logic        [MU_W-1:0] mu1, mu2;
  logic signed [W_W-1:0]  w1 [N1];
  logic signed [W_W-1:0]  w2 [N2];

  dnlms_hybrid_filter u_full (
    .clk, .rst, .xin, .din, .beta,
    .yout(y1), .e(e1), .energy(en1), .mu(mu1), .w(w1),
    .lut_wclk(clk), .lut_we(1'b0), .lut_waddr('0), .lut_wdata('0)
  );

  dnlms_hybrid_filter #(.N(N2), .P(P2), .D(D2), .ALPHA(AL2)) u_small (
    .clk, .rst, .xin, .din, .beta,
    .yout(y2), .e(e2), .energy(en2), .mu(mu2), .w(w2),
    .lut_wclk(clk), .lut_we(1'b0), .lut_waddr('0), .lut_wdata('0)
  );

  int checks = 0, failures = 0;
  int sat_events = 0, adapt_events = 0;

  task automatic check(input string what, input longint got, input longint exp, input int cyc);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("MISMATCH cycle %0d %s: got %0d expected %0d", cyc, what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (SAMPLES + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    dnlms_model m1, m2;
    longint xh [ECHO_LEN];
    longint acc, dv, prev_d;
    real pe, pd;
    int cyc;
    bit rst_n;

    m1 = new(N1, P1, D1, AL1, 8);
    m2 = new(N2, P2, D2, AL2, 8);
    foreach (xh[k]) xh[k] = 0;
    pe = 0.0; pd = 0.0; prev_d = 0;

    for (cyc = 0; cyc < SAMPLES; cyc++) begin
      @(negedge clk);
      rst_n = !(cyc < 3 || (cyc >= 2000 && cyc < 2002));
      if (cyc > 0) begin
        // compare the outputs of the present state
        m1.eval(rst); m2.eval(rst);
        check("y1", y1, m1.y, cyc);   check("e1", e1, m1.e, cyc);
        check("en1", en1, m1.energy, cyc); check("mu1", mu1, m1.mu, cyc);
        check("y2", y2, m2.y, cyc);   check("e2", e2, m2.e, cyc);
        check("en2", en2, m2.energy, cyc); check("mu2", mu2, m2.mu, cyc);
        foreach (w1[k]) check($sformatf("w1[%0d]", k), w1[k], m1.w[k], cyc);
        foreach (w2[k]) check($sformatf("w2[%0d]", k), w2[k], m2.w[k], cyc);
        if (m1.d1 - m1.y > 127 || m1.d1 - m1.y < -128) sat_events++;
        if (m1.ue_pe[0] != 0 && !rst) adapt_events++;
        // latency of one: first output after reset is the sample of the
        // edge that left reset, with all weights still zero
        if (cyc == 4 || cyc == 2003) begin
          check("latency y", y1, 0, cyc);
          check("latency e", e1, prev_d, cyc);
        end
        if (cyc >= SAMPLES - 1000) begin
          pe += real'(e1) * real'(e1);
          pd += real'(m1.d1) * real'(m1.d1);
        end
      end
      // new inputs for the next edge
      for (int k = ECHO_LEN - 1; k > 0; k--) xh[k] = xh[k-1];
      xh[0] = gauss8();
      acc = 0;
      for (int k = 0; k < ECHO_LEN; k++) acc += echo_tap(k, ECHO_LEN) * xh[k];
      dv = clamp((acc >>> 15) + longint'($urandom_range(4)) - 2, 8);
      // short bursts of loud near-end talk against the echo drive the
      // error subtraction into saturation
      if (cyc < 4500 && cyc % 700 >= 350 && cyc % 700 < 360) dv = (acc >= 0) ? -128 : 127;
      xin = X_W'(xh[0]);
      din = X_W'(dv);
      rst = !rst_n;
      prev_d = dv;
      m1.clock(rst, xh[0], dv);
      m2.clock(rst, xh[0], dv);
    end
    @(negedge clk);
    $display("ERLE over the last 1000 samples: %0.1f dB", 10.0 * $log10(pd / pe));
    checks++;
    if (10.0 * $log10(pd / pe) < 10.0) begin
      failures++;
      $display("echo not cancelled");
    end
    checks++;
    if (sat_events == 0 || adapt_events == 0) begin
      failures++;
      $display("saturation events %0d, adaptation cycles %0d", sat_events, adapt_events);
    end
    $display("error saturations %0d, adapting cycles %0d", sat_events, adapt_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
