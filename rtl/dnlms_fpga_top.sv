// dnlms_fpga_top - FPGA test system around the pipelined DNLMS echo
// canceller.
//
// The system runs the hybrid-form DNLMS filter (dnlms_hybrid_filter) over a
// stored far-end signal x(n) and the matching microphone/hybrid signal d(n)
// and records the echo estimate y(n) and the echo-cancelled error e(n):
//   * clk_divider turns the board clock `clk` into the filter clock
//     (clk / DIV; the filter closes timing near 32 MHz, so DIV = 2 for a
//     50 MHz oscillator);
//   * two dual_clock_ram sample memories hold x(n) and d(n), two more hold
//     y(n) and e(n), NUM_INPUTS words of 8 bits each;
//   * hybrid_test_fsm resets the filter, streams the samples through it and
//     writes its outputs, address k of the result memories holding the
//     outputs for address k of the sample memories.
// Host side (clocked by `clk`): host_wr_x / host_wr_d write host_wdata at
// host_addr into the x or d memory (host_addr is wide enough for both the
// sample memories and the step-size table); host_y / host_e return the words at
// host_raddr one clock later; host_wr_lut writes host_lut_wdata into word
// host_addr[11:0] of the step-size table (its power-up contents are the
// table for ALPHA, so loading another table changes alpha without
// rebuilding). Run control (push-buttons, synchronised to
// the filter clock here): reset_n (active low) returns the controller to
// idle, a rising edge of `start` runs one pass over all NUM_INPUTS samples.
// `busy` and `done` come from the controller, in the filter clock domain,
// and are synchronised to `clk` before they leave the top. The sample count,
// the parameters and the word formats are those of the original
// hardware test; host ports, synchronisers and DIV are this design's choices.
module dnlms_fpga_top
  import dnlms_pkg::*;
#(
  parameter int unsigned NUM_INPUTS = 11212,
  parameter int unsigned N          = 96,
  parameter int unsigned P          = 3,
  parameter int unsigned D          = 32,
  parameter int unsigned ALPHA      = 4096,        // 0.125 as (16,15)
  parameter logic [EN_W-1:0] BETA   = EN_W'(8),    // 0.0625 as (12,7)
  parameter int unsigned DIV        = 2,
  localparam int unsigned AW        = $clog2(NUM_INPUTS),
  localparam int unsigned HAW       = (AW > EN_W) ? AW : EN_W
) (
  input  logic           clk,
  input  logic           reset_n,
  input  logic           start,
  input  logic           host_wr_x,
  input  logic           host_wr_d,
  input  logic [HAW-1:0] host_addr,
  input  logic [X_W-1:0] host_wdata,
  input  logic           host_wr_lut,
  input  logic [MU_W-1:0] host_lut_wdata,
  input  logic [AW-1:0]  host_raddr,
  output logic [X_W-1:0] host_y,
  output logic [X_W-1:0] host_e,
  output logic           busy,
  output logic           done
);
  logic clk_f;

  clk_divider #(.DIV(DIV)) u_div (.clk_in(clk), .clk_out(clk_f));

  // push-button synchronisers into the filter clock domain
  logic [1:0] rst_sync, start_sync;
  always_ff @(posedge clk_f) begin
    rst_sync   <= {rst_sync[0], reset_n};
    start_sync <= {start_sync[0], start};
  end

  logic          filt_rst, rd_en, wr_en, busy_f, done_f;
  logic [AW-1:0] rd_addr, wr_addr;

  hybrid_test_fsm #(.NUM(NUM_INPUTS), .AW(AW)) u_fsm (
    .clk      (clk_f),
    .rst_n    (rst_sync[1]),
    .start    (start_sync[1]),
    .filt_rst,
    .rd_en,
    .rd_addr,
    .wr_en,
    .wr_addr,
    .busy     (busy_f),
    .done     (done_f)
  );

  // status back into the host clock domain
  logic [1:0] busy_sync, done_sync;
  always_ff @(posedge clk) begin
    busy_sync <= {busy_sync[0], busy_f};
    done_sync <= {done_sync[0], done_f};
  end
  assign busy = busy_sync[1];
  assign done = done_sync[1];

  logic [X_W-1:0] xin, din;

  dual_clock_ram #(.W(X_W), .DEPTH(NUM_INPUTS), .AW(AW)) u_xmem (
    .wclk(clk), .we(host_wr_x), .waddr(host_addr[AW-1:0]), .wdata(host_wdata),
    .rclk(clk_f), .re(rd_en), .raddr(rd_addr), .rdata(xin)
  );

  dual_clock_ram #(.W(X_W), .DEPTH(NUM_INPUTS), .AW(AW)) u_dmem (
    .wclk(clk), .we(host_wr_d), .waddr(host_addr[AW-1:0]), .wdata(host_wdata),
    .rclk(clk_f), .re(rd_en), .raddr(rd_addr), .rdata(din)
  );

  logic signed [X_W-1:0]  yout, e;
  logic signed [EN_W-1:0] energy;
  logic        [MU_W-1:0] mu;
  logic signed [W_W-1:0]  w [N];

  dnlms_hybrid_filter #(.N(N), .P(P), .D(D), .ALPHA(ALPHA)) u_filter (
    .clk   (clk_f),
    .rst   (filt_rst),
    .xin   ($signed(xin)),
    .din   ($signed(din)),
    .beta  ($signed(BETA)),
    .yout,
    .e,
    .energy,
    .mu,
    .w,
    .lut_wclk  (clk),
    .lut_we    (host_wr_lut),
    .lut_waddr (host_addr[EN_W-1:0]),
    .lut_wdata (host_lut_wdata)
  );

  dual_clock_ram #(.W(X_W), .DEPTH(NUM_INPUTS), .AW(AW)) u_ymem (
    .wclk(clk_f), .we(wr_en), .waddr(wr_addr), .wdata(yout),
    .rclk(clk), .re(1'b1), .raddr(host_raddr), .rdata(host_y)
  );

  dual_clock_ram #(.W(X_W), .DEPTH(NUM_INPUTS), .AW(AW)) u_emem (
    .wclk(clk_f), .we(wr_en), .waddr(wr_addr), .wdata(e),
    .rclk(clk), .re(1'b1), .raddr(host_raddr), .rdata(host_e)
  );
endmodule
