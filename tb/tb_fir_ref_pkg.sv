// tb_fir_ref_pkg: reference model of the non-uniform wordlength FIR, for the
// testbenches.
//
// fir_ref keeps its own delay line of real values and applies the same
// quantisation steps as the filter is specified to: each register z_n takes
// the previous stage quantised to DLY_FWL[n] fractional bits, each delay signal
// is its source quantised to SIG_FWL[n] bits, and the products with the
// <s,1,17> coefficients are summed exactly. All values involved have fewer than
// 53 significant bits, so double precision reproduces the hardware bit for bit.
// It also computes the floating-point output (the real coefficients of the
// example filter, no delay-line quantisation) and accumulates the signal and
// noise powers for the SQNR, 10*log10(P_signal/P_noise).
package tb_fir_ref_pkg;
  import nuwl_pkg::*;

  // The example filter's coefficients as printed, used for the floating-point output.
  localparam real COEF_REAL [NTAPS] = '{
    0.00431622, 0.00740138, -0.01014178, -0.04423428, -0.03032523, 0.09640909,
    0.28454928, 0.3770314, 0.28454928, 0.09640909, -0.03032523, -0.04423428,
    -0.01014178, 0.00740138, 0.00431622
  };

  // Quantise v to f fractional bits with one integer bit.
  function automatic real quant(real v, int unsigned f, qmode_e m, ref int sat_cnt, ref int drop_cnt);
    real s = v * (2.0 ** f);
    real r = (m == Q_ROUND) ? $floor(s + 0.5) : $floor(s);
    real mx = (2.0 ** f) - 1.0;
    if (r != s) drop_cnt++;
    if (r > mx) begin r = mx; sat_cnt++; end
    return r / (2.0 ** f);
  endfunction

  class fir_ref;
    qmode_e   mode;
    fwl_tab_t sig_fwl, dly_fwl;
    real      z    [NTAPS];   // z[0] unused
    real      zf   [NTAPS];   // unquantised history for the floating-point output
    int       sat_cnt, drop_cnt, dly_drop_cnt;
    real      p_sig, p_noise;
    int       n_out;

    function new(qmode_e m, fwl_tab_t s, fwl_tab_t d);
      mode = m; sig_fwl = s; dly_fwl = d;
      reset();
      sat_cnt = 0; drop_cnt = 0; dly_drop_cnt = 0;
      p_sig = 0.0; p_noise = 0.0; n_out = 0;
    endfunction

    function void reset();
      foreach (z[i])  z[i]  = 0.0;
      foreach (zf[i]) zf[i] = 0.0;
    endfunction

    // Output for input x (real value of the <s,1,15> code), then shift the line.
    // Returns the fixed-point output; yf gets the floating-point one.
    function real step(real x, output real yf, output bit sat);
      real y = 0.0, src, sg;
      int  s0 = sat_cnt, dd = 0;
      real nz [NTAPS];
      yf = 0.0;
      for (int n = 0; n < NTAPS; n++) begin
        src = (n == 0) ? x : z[n];
        sg  = quant(src, sig_fwl[n], mode, sat_cnt, drop_cnt);
        y  += sg * (real'(COEF_Q[n]) / (2.0 ** COEF_FWL));
        yf += ((n == 0) ? x : zf[n]) * COEF_REAL[n];
      end
      for (int n = 1; n < NTAPS; n++) begin
        nz[n] = quant((n == 1) ? x : z[n-1], dly_fwl[n], mode, sat_cnt, dd);
      end
      dly_drop_cnt += dd;
      for (int n = NTAPS - 1; n >= 1; n--) begin
        z[n]  = nz[n];
        zf[n] = (n == 1) ? x : zf[n-1];
      end
      sat = (sat_cnt != s0);
      return y;
    endfunction

    function void add_power(real y, real yf);
      p_sig   += yf * yf;
      p_noise += (yf - y) * (yf - y);
      n_out++;
    endfunction

    function real sqnr_db();
      return 10.0 * $log10(p_sig / p_noise);
    endfunction
  endclass
endpackage
