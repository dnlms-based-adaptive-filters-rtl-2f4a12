// clk_divider - integer clock divider.
//
// Produces clk_out at the frequency of clk_in divided by DIV (an even
// number of at least 2) with a 50% duty cycle: a counter runs to DIV/2-1
// and toggles the output register each time it wraps. It lets the filter,
// whose timing closes below the 50 MHz of a typical board oscillator, run
// from that oscillator; the default DIV = 2 gives 25 MHz. The output clock
// starts toggling without a reset; its phase at power-up does not matter.
module clk_divider #(
  parameter int unsigned DIV = 2
) (
  input  logic clk_in,
  output logic clk_out
);
  localparam int unsigned HALF = DIV / 2;
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  if (DIV < 2 || DIV % 2 != 0) begin : g_bad_div
    $error("DIV must be an even number of at least 2");
  end

  logic [CW-1:0] cnt;

  always_ff @(posedge clk_in) begin
    if (cnt >= CW'(HALF - 1)) begin
      cnt     <= '0;
      clk_out <= ~clk_out;
    end else begin
      cnt     <= cnt + 1'b1;
    end
  end
endmodule
