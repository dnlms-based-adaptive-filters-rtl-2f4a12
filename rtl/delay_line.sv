// delay_line - tapped shift register with synchronous reset.
//
// Every clock edge the input `d` enters tap 0 and each tap k moves to tap
// k+1, so tap k holds the input of k+1 cycles ago. All taps are outputs.
// `rst` (synchronous, active high) clears every tap to zero. The filter
// uses it for the single regressor tap-delay line, for the delay line of
// the error e(n) and for the line that skews the mu(n)*e(n) product across
// the processing elements. LEN must be at least 1.
module delay_line #(
  parameter int unsigned W   = 8,
  parameter int unsigned LEN = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] q [LEN]
);
  if (LEN < 1) begin : g_bad_len
    $error("LEN must be at least 1");
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < LEN; k++) q[k] <= '0;
    end else begin
      q[0] <= d;
      for (int k = 1; k < LEN; k++) q[k] <= q[k-1];
    end
  end
endmodule
