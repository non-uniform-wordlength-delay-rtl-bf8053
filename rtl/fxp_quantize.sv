// fxp_quantize: changes the fractional wordlength of a signed fixed-point value.
//
// The input is <s, IWL, FWL_IN>, the output <s, IWL, FWL_OUT>; the integer
// wordlength is kept. This is the element that gives every delay register and
// every delay signal of the filter its own wordlength.
//  - FWL_OUT >= FWL_IN: the value is exact; zeros are appended on the right.
//  - FWL_OUT <  FWL_IN, MODE = Q_TRUNC: the dropped bits are discarded, which
//    rounds toward minus infinity.
//  - FWL_OUT <  FWL_IN, MODE = Q_ROUND: half an output LSB is added before the
//    bits are dropped (round half up). A positive value just below the top of
//    the range can round up past the largest code; it is then saturated to the
//    largest code and sat_o is raised. Negative values cannot overflow.
// Truncation and rounding are the two modes the filter was evaluated with; the
// rounding tie rule and the saturation are this design's choices.
// Purely combinational. When bits are dropped, the low input bits are unused
// by truncation (lint reports them as unused); that is the quantisation itself.
module fxp_quantize
  import nuwl_pkg::*;
#(
  parameter int unsigned IWL     = 1,
  parameter int unsigned FWL_IN  = 15,
  parameter int unsigned FWL_OUT = 7,
  parameter qmode_e      MODE    = Q_TRUNC
) (
  input  logic signed [IWL+FWL_IN-1:0]  d_i,
  output logic signed [IWL+FWL_OUT-1:0] q_o,
  output logic                          sat_o
);
  localparam int unsigned W_IN  = IWL + FWL_IN;
  localparam int unsigned W_OUT = IWL + FWL_OUT;

  if (FWL_OUT >= FWL_IN) begin : g_widen
    localparam int unsigned SH = FWL_OUT - FWL_IN;
    if (SH == 0) begin : g_same
      assign q_o = d_i;
    end else begin : g_pad
      assign q_o = {d_i, {SH{1'b0}}};
    end
    assign sat_o = 1'b0;
  end else begin : g_narrow
    localparam int unsigned SH = FWL_IN - FWL_OUT;
    if (MODE == Q_TRUNC) begin : g_trunc
      assign q_o   = d_i[W_IN-1:SH];
      assign sat_o = 1'b0;
    end else begin : g_round
      // One extra bit on top holds a carry out of the largest code.
      logic signed [W_IN:0]  sum;
      logic signed [W_OUT:0] r;
      always_comb begin
        sum = {d_i[W_IN-1], d_i} + ((W_IN+1)'(1) << (SH - 1));
        r   = sum[W_IN:SH];
        // r can only exceed the range upward: sign of r clear, top data bit set.
        sat_o = (r[W_OUT] == 1'b0) && r[W_OUT-1];
        q_o   = sat_o ? {1'b0, {(W_OUT-1){1'b1}}} : r[W_OUT-1:0];
      end
    end
  end
endmodule
