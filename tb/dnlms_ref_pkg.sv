// dnlms_ref_pkg - reference model of the pipelined DNLMS filter for the
// testbenches.
//
// The model keeps the filter state in plain integer arrays and advances it
// one sample per call, with every fixed-point operation written out as
// integer arithmetic: products at full precision, an arithmetic right shift
// for truncation, and an explicit clamp for saturation. It follows the
// hybrid data flow (skewed partial sums, one shared regressor line, delayed
// error and mu*e) so that its outputs can be compared sample by sample with
// the RTL. The step-size table is computed here as floor(alpha/(2*E)) on
// the raw integer codes, independently of the RTL's own table function.
// Also in the package: an echo-path model and a Gaussian-like sample
// generator used to build test signals.
package dnlms_ref_pkg;

  function automatic longint clamp(input longint v, input int bits);
    longint hi, lo;
    hi = (longint'(1) << (bits - 1)) - 1;
    lo = -(longint'(1) << (bits - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // product of two codes, dropping `sh` fractional bits, into `bits` bits
  function automatic longint qmul(input longint a, input longint b,
                                  input int sh, input int bits);
    return clamp((a * b) >>> sh, bits);
  endfunction

  function automatic longint lut_mu(input longint en, input longint alpha);
    longint q;
    if (en < 0)  return 0;
    if (en == 0) return 1023;
    q = alpha / (2 * en);
    return (q > 1023) ? 1023 : q;
  endfunction

  class dnlms_model;
    int n, p, d, npe, nt, ed;
    longint alpha, beta;
    // registers
    longint x[];        // regressor line, x[k] = x(n-k)
    longint d1;
    longint w[];
    longint a_reg[];    // a_reg[i]: registered partial sum into element i
    longint e_dl[];
    longint ue_dl[];
    longint en_d;
    longint mu_reg;
    // combinational results of the current cycle
    longint y, e, energy, mu, ue_pe[];
    longint a_reg_next[];

    function new(int n_, int p_, int d_, longint alpha_, longint beta_);
      n = n_; p = p_; d = d_; alpha = alpha_; beta = beta_;
      npe = n / p; nt = d + n - npe + 1; ed = d - npe + 1;
      x = new[nt]; w = new[n]; a_reg = new[npe]; e_dl = new[ed];
      ue_dl = new[(npe > 1) ? npe - 1 : 1]; ue_pe = new[npe]; a_reg_next = new[npe];
      mu_reg = 0;
      reset_state();
    endfunction

    function void reset_state();
      foreach (x[k]) x[k] = 0;
      foreach (w[k]) w[k] = 0;
      foreach (a_reg[k]) a_reg[k] = 0;
      foreach (e_dl[k]) e_dl[k] = 0;
      foreach (ue_dl[k]) ue_dl[k] = 0;
      d1 = 0;
      en_d = beta;
    endfunction

    // evaluate the combinational outputs for the present register state
    function void eval(bit rst);
      longint s, sq_new, sq_old, t;
      longint a_out[];
      a_out = new[npe];
      for (int i = npe - 1; i >= 0; i--) begin
        s = (i == npe - 1) ? 0 : a_reg[i];
        for (int j = p - 1; j >= 0; j--)
          s = clamp(s + qmul(x[i*(p-1)+j], w[i*p+j], 9, 16), 16);
        a_out[i] = s;
      end
      y = a_out[0] >>> 8;
      e = clamp(d1 - y, 8);
      sq_new = qmul(x[d-npe], x[d-npe], 7, 8);
      sq_old = qmul(x[nt-1], x[nt-1], 7, 8);
      t      = clamp(en_d - sq_old, 12);
      energy = clamp(t + sq_new, 12);
      mu     = rst ? 0 : mu_reg;
      for (int i = 0; i < npe; i++)
        ue_pe[i] = (i == npe - 1) ? qmul(mu, e_dl[ed-1], 2, 13) : ue_dl[npe-2-i];
      // keep a_out for the register update
      for (int i = 1; i < npe; i++) a_reg_next[i-1] = a_out[i];
    endfunction

    // clock edge: xin/din are the inputs sampled at this edge
    function void clock(bit rst, longint xin, longint din);
      longint ue_top;
      longint w_new[];
      eval(rst);
      ue_top = ue_pe[npe-1];
      mu_reg = lut_mu(energy, alpha);
      if (rst) begin
        reset_state();
        return;
      end
      w_new = new[n];
      for (int i = 0; i < npe; i++)
        for (int j = 0; j < p; j++)
          w_new[i*p+j] = clamp(w[i*p+j] + qmul(x[d+i*(p-1)+j], ue_pe[i], 2, 18), 18);
      w = w_new;
      for (int i = 0; i < npe - 1; i++) a_reg[i] = a_reg_next[i];
      a_reg[npe-1] = 0;
      for (int k = ed - 1; k > 0; k--) e_dl[k] = e_dl[k-1];
      e_dl[0] = e;
      if (npe > 1) begin
        for (int k = npe - 2; k > 0; k--) ue_dl[k] = ue_dl[k-1];
        ue_dl[0] = ue_top;
      end
      for (int k = nt - 1; k > 0; k--) x[k] = x[k-1];
      x[0] = xin;
      d1 = din;
      en_d = energy;
    endfunction
  endclass

  // Gaussian-like 8-bit sample with standard deviation near 0.3
  function automatic longint gauss8();
    longint s;
    s = 0;
    for (int k = 0; k < 4; k++) s += longint'($urandom_range(64)) - 32;
    return clamp(s, 8);
  endfunction

  // echo path tap k as a (16,15) code: a bulk delay of 4 samples, then a
  // decaying oscillation (about 6 dB echo return loss for white input)
  function automatic longint echo_tap(input int k, input int len);
    real h;
    if (k < 4 || k >= len) return 0;
    h = 0.55 * $exp(-(k - 4) / 9.0) * $cos(0.6 * (k - 4));
    return longint'(h * 32768.0);
  endfunction

endpackage
