// nuwl_fir: parallel (direct-form) FIR filter with a non-uniform wordlength
// delay line.
//
// y(k) = sum_{n=0..N} c_n * x(k-n), N = NTAPS-1. The delay line z_1..z_N holds
// past input samples, and the delay signal Signal_Dn carries sample x(k-n) to
// multiplier n. The point of the design is that these wordlengths differ from
// tap to tap: the quantisation noise a delay signal adds at the output is
// proportional to the coefficient it is multiplied by, so signals that meet
// small coefficients keep fewer fractional bits (SIG_FWL[n]). Each delay
// register z_n keeps the fractional bits that it and the taps after it still
// need (DLY_FWL[n]); the delay line narrows where the outer, small coefficients
// are. Each multiplier is as wide as its delay signal plus its coefficient, and
// the products are summed at full precision.
//
// Defaults: the 15-tap example low-pass filter with the wordlengths found for
// truncation and a non-uniform delay line. The other three assignments of the
// evaluation are in nuwl_pkg. The input format <s,1,15>, the coefficient
// format <s,1,17>, the accumulator's 3 integer bits, the sample strobe, the
// output register and the reset are this design's choices.
//
// Interface:
//   x_i      <s,1,IN_FWL> input sample, taken when x_valid_i is high
//   y_o      <s,ACC_IWL,Y_FWL> output y(k), Y_FWL = max(SIG_FWL) + COEF_FWL
//   y_valid_o high for one cycle when y_o holds a new output
//   sat_o    set with y_o when, for that sample, a delay signal or a value
//            entering a delay register was clipped by rounding (Q_ROUND only;
//            with truncation nothing can clip and sat_o stays 0)
// Timing: one sample per clock at most. y(k) for the sample taken at edge t
// appears on y_o after edge t (latency one clock); between samples everything
// holds. rst_ni clears the delay line and the output asynchronously.
module nuwl_fir
  import nuwl_pkg::*;
#(
  parameter qmode_e    MODE    = Q_TRUNC,
  parameter fwl_tab_t  SIG_FWL = NU_TRUNC_SIG,
  parameter fwl_tab_t  DLY_FWL = NU_TRUNC_DLY,
  parameter coef_tab_t COEF    = COEF_Q,
  localparam int unsigned Y_FWL = tab_max(SIG_FWL, 1'b0) + COEF_FWL,
  localparam int unsigned Y_W   = ACC_IWL + Y_FWL
) (
  input  logic                     clk,
  input  logic                     rst_ni,
  input  logic                     x_valid_i,
  input  logic signed [DATA_IWL+IN_FWL-1:0] x_i,
  output logic                     y_valid_o,
  output logic signed [Y_W-1:0]    y_o,
  output logic                     sat_o  // a rounding quantiser saturated for this output
);
  // Widest value on the delay line: the input or the widest register.
  localparam int unsigned Z_W = DATA_IWL + imax(IN_FWL, tab_max(DLY_FWL, 1'b1));

  // z_ext[n] is the output of z_n sign-extended to Z_W bits (z_ext[0] is the
  // input). It only carries the value to the next stage; each register itself
  // is DATA_IWL + DLY_FWL[n] bits wide.
  logic signed [Z_W-1:0] z_ext [NTAPS];
  // Partial sums of the adder chain; psum[n] includes taps 0..n.
  logic signed [Y_W-1:0] psum  [NTAPS];

  // Saturation flags: bit n for Signal_Dn, bit NTAPS+n for register z_n.
  logic [2*NTAPS-1:0] sat;

  assign z_ext[0]      = Z_W'(x_i);
  assign sat[NTAPS]    = 1'b0;   // there is no z_0

  for (genvar n = 0; n < NTAPS; n++) begin : g_tap
    localparam int unsigned SW     = DATA_IWL + SIG_FWL[n];
    localparam int unsigned PW     = SW + COEF_W;
    localparam int unsigned PFWL   = SIG_FWL[n] + COEF_FWL;
    localparam int unsigned SRC_FWL = (n == 0) ? IN_FWL : DLY_FWL[n];
    localparam int unsigned SRC_W  = DATA_IWL + SRC_FWL;

    logic signed [SW-1:0]     sig_d;   // Signal_Dn
    logic signed [PW-1:0]     prod;
    logic signed [COEF_W-1:0] coef;

    if (n > 0) begin : g_dly
      localparam int unsigned PREV_FWL = (n == 1) ? IN_FWL : DLY_FWL[n-1];
      logic signed [DATA_IWL+DLY_FWL[n]-1:0] z;
      nuwl_delay #(
        .IWL(DATA_IWL), .FWL_IN(PREV_FWL), .FWL(DLY_FWL[n]), .MODE(MODE)
      ) u_z (
        .clk   (clk),
        .rst_ni(rst_ni),
        .en_i  (x_valid_i),
        .d_i   (z_ext[n-1][DATA_IWL+PREV_FWL-1:0]),
        .q_o   (z),
        .sat_o (sat[NTAPS+n])
      );
      assign z_ext[n] = Z_W'(z);
    end

    fxp_quantize #(
      .IWL(DATA_IWL), .FWL_IN(SRC_FWL), .FWL_OUT(SIG_FWL[n]), .MODE(MODE)
    ) u_sig (
      .d_i  (z_ext[n][SRC_W-1:0]),
      .q_o  (sig_d),
      .sat_o(sat[n])
    );

    assign coef = COEF_W'(COEF[n]);

    tap_mult #(.A_W(SW), .B_W(COEF_W)) u_mul (
      .a_i(sig_d),
      .b_i(coef),
      .p_o(prod)
    );

    if (n == 0) begin : g_first
      // Full-precision alignment of the first product starts the chain.
      assign psum[0] = Y_W'(prod) <<< (Y_FWL - PFWL);
    end else begin : g_add
      tap_add #(.P_W(PW), .P_FWL(PFWL), .S_W(Y_W), .S_FWL(Y_FWL)) u_add (
        .p_i(prod),
        .s_i(psum[n-1]),
        .s_o(psum[n])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni) begin
      y_o       <= '0;
      y_valid_o <= 1'b0;
      sat_o     <= 1'b0;
    end else begin
      y_valid_o <= x_valid_i;
      if (x_valid_i) begin
        y_o   <= psum[NTAPS-1];
        sat_o <= |sat;
      end
    end
  end
endmodule
