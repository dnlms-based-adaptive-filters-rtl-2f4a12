// dnlms_pe - processing element of the hybrid-form DNLMS FIR filter.
//
// The element holds P adaptive weights. Each clock it
//   * filters: multiplies its P regressor samples x_in[j] by the weights
//     w[j] and adds the P products to the partial output a_in arriving from
//     the next element, a_out = a_in + pf[P-1] + ... + pf[0] (a serial adder
//     chain, each step saturating in the (16,15) format);
//   * adapts: multiplies its P delayed regressor samples xd_in[j] by the
//     broadcast mu*e product ue_in and adds the result to the weights,
//     w[j] <= w[j] + xd_in[j]*ue_in, registered at the clock edge.
// Weights are (18,17), samples (8,7), ue_in (13,12), partial sums (16,15).
// The weight update and the filter both see the weights of the current
// cycle, so a weight written at edge t affects a_out from cycle t onwards.
// a_out is combinational from the inputs and the weight registers; the
// register that pipelines it to the next element sits in the filter.
// `rst` (synchronous, active high) clears the weights. The element's
// structure (P weights, two multipliers per weight, a serial adder) is the
// hybrid-form architecture; the order of the chained additions is this
// design's choice.
module dnlms_pe
  import dnlms_pkg::*;
#(
  parameter int unsigned P = 3
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [X_W-1:0]  x_in  [P],
  input  logic signed [X_W-1:0]  xd_in [P],
  input  logic signed [A_W-1:0]  a_in,
  input  logic signed [UE_W-1:0] ue_in,
  output logic signed [A_W-1:0]  a_out,
  output logic signed [W_W-1:0]  w     [P]
);
  logic signed [A_W-1:0] pf     [P];    // filter products x_in*w
  logic signed [W_W-1:0] pw     [P];    // update terms xd_in*ue_in
  logic signed [W_W-1:0] w_next [P];
  logic signed [A_W-1:0] s      [P+1];  // serial adder chain

  assign s[P]  = a_in;
  assign a_out = s[0];

  for (genvar j = 0; j < P; j++) begin : g_tap
    sat_mult #(.AW(X_W), .AF(X_F), .BW(W_W), .BF(W_F), .CW(A_W), .CF(A_F))
      u_mul_f (.a(x_in[j]), .b(w[j]), .c(pf[j]));

    sat_mult #(.AW(X_W), .AF(X_F), .BW(UE_W), .BF(UE_F), .CW(W_W), .CF(W_F))
      u_mul_w (.a(xd_in[j]), .b(ue_in), .c(pw[j]));

    sat_add #(.AW(W_W), .AF(W_F), .BW(W_W), .BF(W_F), .CW(W_W), .CF(W_F))
      u_add_w (.a(w[j]), .b(pw[j]), .c(w_next[j]));

    sat_add #(.AW(A_W), .AF(A_F), .BW(A_W), .BF(A_F), .CW(A_W), .CF(A_F))
      u_add_s (.a(s[j+1]), .b(pf[j]), .c(s[j]));

    always_ff @(posedge clk) begin
      if (rst) w[j] <= '0;
      else     w[j] <= w_next[j];
    end
  end
endmodule
