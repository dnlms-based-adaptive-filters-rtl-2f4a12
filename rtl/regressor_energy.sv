// regressor_energy - running regressor energy ||x||^2 + beta.
//
// The energy of the N-sample regressor window is kept recursively instead of
// being summed every sample: when sample x_new enters the window and x_old
// leaves it,
//     energy = energy_d - x_old^2 + x_new^2,   energy_d <= energy,
// with each square truncated to (8,7) and each addition saturating in the
// (12,7) energy format. The register energy_d is loaded with the small
// constant beta by the synchronous reset, so beta is carried along in the
// sum and the step size alpha/(||x||^2 + beta) never divides by zero.
// `energy` is combinational from the current inputs and the register; it is
// the address of the step-size look-up table.
module regressor_energy
  import dnlms_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [X_W-1:0]  x_new,
  input  logic signed [X_W-1:0]  x_old,
  input  logic signed [EN_W-1:0] beta,
  output logic signed [EN_W-1:0] energy
);
  logic signed [XSQ_W-1:0] sq_new, sq_old;
  logic signed [EN_W-1:0]  energy_d, energy_tmp;

  sat_mult #(.AW(X_W), .AF(X_F), .BW(X_W), .BF(X_F), .CW(XSQ_W), .CF(XSQ_F))
    u_sq_new (.a(x_new), .b(x_new), .c(sq_new));

  sat_mult #(.AW(X_W), .AF(X_F), .BW(X_W), .BF(X_F), .CW(XSQ_W), .CF(XSQ_F))
    u_sq_old (.a(x_old), .b(x_old), .c(sq_old));

  sat_add #(.AW(EN_W), .AF(EN_F), .BW(XSQ_W), .BF(XSQ_F), .CW(EN_W), .CF(EN_F), .SUB(1'b1))
    u_sub (.a(energy_d), .b(sq_old), .c(energy_tmp));

  sat_add #(.AW(EN_W), .AF(EN_F), .BW(XSQ_W), .BF(XSQ_F), .CW(EN_W), .CF(EN_F))
    u_add (.a(energy_tmp), .b(sq_new), .c(energy));

  always_ff @(posedge clk) begin
    if (rst) energy_d <= beta;
    else     energy_d <= energy;
  end
endmodule
