// dual_clock_ram - simple dual-port RAM with independent write and read
// clocks.
//
// Port A writes `wdata` to `waddr` at a rising edge of wclk when `we` is
// high. Port B registers the word at `raddr` into `rdata` at a rising edge
// of rclk when `re` is high, so read data appears one rclk cycle after the
// address (and holds while re is low). A read of an address that is being
// written in the same instant returns either word. Contents are not
// initialised. In the test system this is the sample memory the filter
// reads its x(n) and d(n) from and the result memory it writes y(n) and
// e(n) to; the other port belongs to the host that fills and reads them.
module dual_clock_ram #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 11212,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          wclk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          rclk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we && waddr < AW'(DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    if (re) rdata <= (raddr < AW'(DEPTH)) ? mem[raddr] : '0;
  end
endmodule
