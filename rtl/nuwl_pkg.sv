// nuwl_pkg: types and constants shared by the non-uniform wordlength FIR.
//
// All data are signed two's-complement fixed-point numbers <s, iwl, fwl>:
// wl = iwl + fwl bits, the integer part iwl includes the sign bit, and the
// integer value held in the bits is the real value times 2^fwl.
//
// The wordlength tables below are the four fractional-wordlength assignments
// found for the 15-tap example low-pass filter (truncation and rounding, each
// with a uniform and a non-uniform delay line). Entry n of a *_SIG table is the
// fwl of the delay signal that feeds multiplier n; entry n of a *_DLY table is
// the fwl of delay register z_n. Tap 0 is fed straight from the input and has
// no delay register, so entry 0 of every *_DLY table is unused and set to 0.
//
// The coefficients are the example filter's taps, quantised for this design to
// <s,1,17> as COEF_Q[n] = round(c_n * 2^17). The wordlength of the coefficients,
// the input format and the accumulator's integer bits are this design's choices.
package nuwl_pkg;

  // Quantisation mode applied wherever fractional bits are dropped.
  typedef enum logic [0:0] {
    Q_TRUNC = 1'b0,   // floor toward minus infinity (drop the low bits)
    Q_ROUND = 1'b1    // round half up, saturate if the result overflows
  } qmode_e;

  localparam int unsigned NTAPS    = 15;  // coefficients c_0 .. c_14
  localparam int unsigned DATA_IWL = 1;   // delay line data: sign bit only
  localparam int unsigned IN_FWL   = 15;  // input sample x(k) is <s,1,15>
  localparam int unsigned COEF_IWL = 1;
  localparam int unsigned COEF_FWL = 17;  // coefficient is <s,1,17>
  localparam int unsigned COEF_W   = COEF_IWL + COEF_FWL;
  localparam int unsigned ACC_IWL  = 3;   // output/partial sums: one guard bit over sum|c|<2

  typedef int unsigned fwl_tab_t [NTAPS];
  typedef int          coef_tab_t [NTAPS];

  // round(c_n * 2^17) for the example filter's coefficients
  // (0.00431622, 0.00740138, -0.01014178, -0.04423428, -0.03032523, 0.09640909,
  //  0.28454928, 0.3770314, then mirrored).
  localparam coef_tab_t COEF_Q = '{
    566, 970, -1329, -5798, -3975, 12637, 37296, 49418,
    37296, 12637, -3975, -5798, -1329, 970, 566
  };

  // Truncation, non-uniform delay line (the default configuration).
  localparam fwl_tab_t NU_TRUNC_SIG = '{7, 8, 8, 10, 10, 12, 14, 14, 14, 12, 10, 10, 8, 8, 7};
  localparam fwl_tab_t NU_TRUNC_DLY = '{0, 14, 14, 14, 14, 14, 14, 14, 14, 12, 10, 10, 8, 8, 7};
  // Rounding, non-uniform delay line.
  localparam fwl_tab_t NU_ROUND_SIG = '{8, 8, 8, 11, 10, 12, 14, 14, 14, 12, 10, 11, 8, 8, 8};
  localparam fwl_tab_t NU_ROUND_DLY = '{0, 14, 14, 14, 14, 14, 14, 14, 14, 12, 10, 11, 8, 8, 8};
  // Uniform delay lines, the reference point of the comparison.
  localparam fwl_tab_t U_TRUNC_SIG  = '{14, 14, 14, 14, 14, 14, 14, 14, 14, 14, 14, 14, 14, 14, 14};
  localparam fwl_tab_t U_TRUNC_DLY  = '{0, 14, 14, 14, 14, 14, 14, 14, 14, 14, 14, 14, 14, 14, 14};
  localparam fwl_tab_t U_ROUND_SIG  = '{13, 13, 13, 13, 13, 13, 13, 13, 13, 13, 13, 13, 13, 13, 13};
  localparam fwl_tab_t U_ROUND_DLY  = '{0, 13, 13, 13, 13, 13, 13, 13, 13, 13, 13, 13, 13, 13, 13};

  // Largest entry of a wordlength table, skipping entry 0 when skip0 is set.
  function automatic int unsigned tab_max(fwl_tab_t t, bit skip0);
    int unsigned m = 0;
    for (int i = 0; i < NTAPS; i++) begin
      if (!(skip0 && i == 0) && t[i] > m) m = t[i];
    end
    return m;
  endfunction

  function automatic int unsigned imax(int unsigned a, int unsigned b);
    return (a > b) ? a : b;
  endfunction

endpackage
