// dnlms_pkg - word formats and shared constants of the pipelined hybrid-form
// DNLMS echo-canceller filter.
//
// All signals are two's-complement fixed point. A format is written (W, F):
// W bits in total including the sign, F of them fractional. The formats
// below are the ones the filter was sized with: 8-bit samples, 18-bit
// weights, an 11-bit step size with 3 integer bits and a 12-bit regressor
// energy with 4 integer bits. The formats of the internal products
// (partial sums, x^2 and the mu*e product) follow the same design. Every
// adder and multiplier truncates toward minus infinity (drops LSBs) and
// saturates on overflow.
package dnlms_pkg;

  // input x(n), desired d(n), output y(n), error e(n): (8,7)
  localparam int unsigned X_W   = 8;
  localparam int unsigned X_F   = 7;
  // adaptive weights w(n): (18,17)
  localparam int unsigned W_W   = 18;
  localparam int unsigned W_F   = 17;
  // step size mu(n): (11,7)
  localparam int unsigned MU_W  = 11;
  localparam int unsigned MU_F  = 7;
  // regressor energy ||x(n)||^2 + beta: (12,7)
  localparam int unsigned EN_W  = 12;
  localparam int unsigned EN_F  = 7;
  // mu(n)*e(n) product broadcast to the processing elements: (13,12)
  localparam int unsigned UE_W  = 13;
  localparam int unsigned UE_F  = 12;
  // filter partial products and the serial adder chain: (16,15)
  localparam int unsigned A_W   = 16;
  localparam int unsigned A_F   = 15;
  // squared input sample x^2 used by the energy recursion: (8,7)
  localparam int unsigned XSQ_W = 8;
  localparam int unsigned XSQ_F = 7;
  // convergence parameter alpha held as (16,15)
  localparam int unsigned AL_W  = 16;
  localparam int unsigned AL_F  = 15;

  // Step size stored in the division look-up table at energy code `en`
  // (an (EN_W,EN_F) word) for convergence parameter `alpha` (an (AL_W,AL_F)
  // word): mu = floor(alpha / energy) in (MU_W,MU_F), saturated to the
  // largest positive step for a zero energy. A negative energy cannot occur
  // in the filter (the recursion starts at beta > 0 and only ever adds and
  // removes the same squares); the table returns a zero step there.
  function automatic logic [MU_W-1:0] step_size(input logic [EN_W-1:0] en,
                                                input int unsigned alpha);
    longint num, den, q;
    longint mu_max;
    mu_max = (longint'(1) << (MU_W - 1)) - 1;
    if ($signed(en) < 0) return '0;
    if (en == '0) return MU_W'(mu_max);
    // mu * 2^MU_F = alpha * 2^(MU_F + EN_F - AL_F) / en
    num = longint'(alpha) << (MU_F + EN_F);
    den = longint'(en) << AL_F;
    q   = num / den;
    if (q > mu_max) q = mu_max;
    return MU_W'(q);
  endfunction

endpackage
