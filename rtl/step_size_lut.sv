// step_size_lut - division look-up table for the normalised step size.
//
// The NLMS step size mu = alpha / (||x||^2 + beta) would need a divider on
// the critical path. Instead the (12,7) energy word addresses a ROM of
// 2^12 words that holds mu precomputed in the (11,7) format, truncated and
// saturated (see dnlms_pkg::step_size). The table is filled at elaboration
// from the parameter ALPHA, given as a (16,15) word (4096 = 0.125,
// 16384 = 0.5). The read is synchronous: `mu` is the table word for the
// address presented at the previous clock edge, which is the pipeline delay
// the filter needs after the division. The output register is not reset;
// the filter masks it while in reset. A write port on its own clock lets a
// host replace table words while the filter runs (wdata is stored at waddr
// when we is high at a wclk edge), for instance to load the table of
// another alpha; the power-up contents are the table for ALPHA.
module step_size_lut
  import dnlms_pkg::*;
#(
  parameter int unsigned ALPHA = 4096
) (
  input  logic                  clk,
  input  logic [EN_W-1:0]       addr,
  output logic [MU_W-1:0]       mu,
  input  logic                  wclk,
  input  logic                  we,
  input  logic [EN_W-1:0]       waddr,
  input  logic [MU_W-1:0]       wdata
);
  localparam int unsigned DEPTH = 1 << EN_W;

  logic [MU_W-1:0] rom [DEPTH];

  initial begin
    for (int k = 0; k < DEPTH; k++) rom[k] = step_size(EN_W'(k), ALPHA);
  end

  always_ff @(posedge clk) mu <= rom[addr];

  always_ff @(posedge wclk) begin
    if (we) rom[waddr] <= wdata;
  end
endmodule
