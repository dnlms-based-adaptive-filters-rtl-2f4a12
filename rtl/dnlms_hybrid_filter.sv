// dnlms_hybrid_filter - pipelined hybrid-form DNLMS adaptive FIR filter for
// echo cancellation.
//
// The filter models an unknown echo path with N adaptive weights and
// subtracts its echo estimate y(n) from the desired signal d(n); the error
// e(n) = d(n) - y(n) is the echo-cancelled output and also drives the
// delayed normalised LMS (DNLMS) weight update
//     w(n+1) = w(n) + mu(n-D) e(n-D) x(n-D),  mu = alpha/(||x||^2 + beta).
//
// Structure (hybrid form, obtained from the direct form by cutset retiming):
//   * N/P processing elements (dnlms_pe) of P weights each. The partial
//     outputs flow from element N/P-1 towards element 0 through one register
//     per element, so element i works i samples ahead and reads its P taps
//     starting at regressor tap i*(P-1). Element 0 produces y(n).
//   * One shared tap-delay line of D + N - N/P + 1 samples serves both the
//     regressor x(n) and the delayed regressor x(n-D) (element i reads the
//     latter from tap D + i*(P-1)), instead of two separate lines.
//   * The regressor energy is kept recursively (regressor_energy) and
//     addresses a division look-up table (step_size_lut) whose registered
//     output is mu. The product mu*e enters element N/P-1 directly and
//     reaches element i after N/P-1-i register stages, so element i sees
//     mu(n-D+i) e(n-D+i). The error is delayed by D - N/P + 1 samples
//     before the multiplication.
//   * The critical path is P+1 additions and one multiplication, whatever N.
// The adaptation delay must satisfy D >= N/P; the defaults N = 96, P = 3,
// D = 32 sit at that minimum.
//
// Interface and timing: one sample per clock. xin and din are registered on
// entry, so the y and e outputs for the sample presented at edge t are
// valid (combinationally) during the cycle after edge t: a latency of one
// clock. `rst` is synchronous and active high; it clears all registers,
// loads the energy register with `beta` and forces the step size to zero.
// The first sample after reset may be presented at the edge on which rst is
// sampled low. `energy` and `mu` expose the step-size path; `w` gives all N
// weights, w[k] being tap k of the element it lives in (k = i*P + j). The
// lut_* port rewrites words of the step-size table on its own clock.
// Arithmetic: two's complement, truncation and saturation everywhere, word
// formats from dnlms_pkg. The error subtraction is done at full precision
// before saturation, and the step-size register is masked in reset; both are
// this design's choices.
module dnlms_hybrid_filter
  import dnlms_pkg::*;
#(
  parameter int unsigned N     = 96,    // filter length (multiple of P)
  parameter int unsigned P     = 3,     // weights per processing element
  parameter int unsigned D     = 32,    // adaptation delay, D >= N/P
  parameter int unsigned ALPHA = 4096   // alpha as a (16,15) word, 0.125
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [X_W-1:0]  xin,
  input  logic signed [X_W-1:0]  din,
  input  logic signed [EN_W-1:0] beta,
  output logic signed [X_W-1:0]  yout,
  output logic signed [X_W-1:0]  e,
  output logic signed [EN_W-1:0] energy,
  output logic        [MU_W-1:0] mu,
  output logic signed [W_W-1:0]  w [N],
  input  logic                   lut_wclk,
  input  logic                   lut_we,
  input  logic [EN_W-1:0]        lut_waddr,
  input  logic [MU_W-1:0]        lut_wdata
);
  localparam int unsigned NPE = N / P;            // number of elements
  localparam int unsigned NT  = D + N - NPE + 1;  // regressor taps
  localparam int unsigned ED  = D - NPE + 1;      // error delay

  if (N % P != 0) begin : g_bad_np
    $error("N must be a multiple of P");
  end
  if (D < NPE) begin : g_bad_d
    $error("the adaptation delay D must be at least N/P");
  end

  // ---------------------------------------------------------------- inputs
  logic signed [X_W-1:0] x [NT];     // x[k] = x(n-k)
  logic signed [X_W-1:0] d1;         // d(n)

  delay_line #(.W(X_W), .LEN(NT)) u_regressor (
    .clk, .rst, .d(xin), .q(x)
  );

  always_ff @(posedge clk) begin
    if (rst) d1 <= '0;
    else     d1 <= din;
  end

  // ------------------------------------------------------- output and error
  logic signed [A_W-1:0] a_in  [NPE];
  logic signed [A_W-1:0] a_out [NPE];

  sat_trunc #(.IW(A_W), .IF(A_F), .OW(X_W), .OF(X_F)) u_yfmt (
    .a(a_out[0]), .c(yout)
  );

  sat_add #(.AW(X_W), .AF(X_F), .BW(X_W), .BF(X_F), .CW(X_W), .CF(X_F), .SUB(1'b1))
    u_err (.a(d1), .b(yout), .c(e));

  // ------------------------------------------------------------ step size
  logic signed [X_W-1:0]  e_dl [ED];   // e_dl[k] = e(n-1-k)
  logic        [MU_W-1:0] mu_lut;
  logic signed [MU_W-1:0] mu_eff;
  logic signed [UE_W-1:0] ue_top;

  delay_line #(.W(X_W), .LEN(ED)) u_err_line (
    .clk, .rst, .d(e), .q(e_dl)
  );

  regressor_energy u_energy (
    .clk, .rst,
    .x_new (x[D-NPE]),
    .x_old (x[NT-1]),
    .beta,
    .energy
  );

  step_size_lut #(.ALPHA(ALPHA)) u_lut (
    .clk, .addr(energy), .mu(mu_lut),
    .wclk(lut_wclk), .we(lut_we), .waddr(lut_waddr), .wdata(lut_wdata)
  );

  assign mu_eff = rst ? '0 : $signed(mu_lut);
  assign mu     = mu_eff;

  sat_mult #(.AW(MU_W), .AF(MU_F), .BW(X_W), .BF(X_F), .CW(UE_W), .CF(UE_F))
    u_mue (.a(mu_eff), .b(e_dl[ED-1]), .c(ue_top));

  // ue_pe[i] is the mu*e product seen by element i
  logic signed [UE_W-1:0] ue_pe [NPE];

  if (NPE > 1) begin : g_ue_line
    logic signed [UE_W-1:0] ue_dl [NPE-1];
    delay_line #(.W(UE_W), .LEN(NPE-1)) u_ue_line (
      .clk, .rst, .d(ue_top), .q(ue_dl)
    );
    for (genvar i = 0; i < NPE - 1; i++) begin : g_tap
      assign ue_pe[i] = ue_dl[NPE-2-i];
    end
  end
  assign ue_pe[NPE-1] = ue_top;

  // --------------------------------------------------- processing elements
  assign a_in[NPE-1] = '0;

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    logic signed [X_W-1:0] xs  [P];
    logic signed [X_W-1:0] xds [P];
    logic signed [W_W-1:0] wp  [P];

    for (genvar j = 0; j < P; j++) begin : g_sel
      assign xs[j]      = x[i*(P-1) + j];
      assign xds[j]     = x[D + i*(P-1) + j];
      assign w[i*P + j] = wp[j];
    end

    dnlms_pe #(.P(P)) u_pe (
      .clk, .rst,
      .x_in  (xs),
      .xd_in (xds),
      .a_in  (a_in[i]),
      .ue_in (ue_pe[i]),
      .a_out (a_out[i]),
      .w     (wp)
    );

    // pipeline register of the serial adder between element i and i-1
    if (i > 0) begin : g_areg
      always_ff @(posedge clk) begin
        if (rst) a_in[i-1] <= '0;
        else     a_in[i-1] <= a_out[i];
      end
    end
  end
endmodule
