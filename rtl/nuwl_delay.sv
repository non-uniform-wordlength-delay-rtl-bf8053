// nuwl_delay: one register z_n of the non-uniform wordlength delay line.
//
// It holds the sample x(k-n) at its own fractional wordlength FWL. Its input
// comes from the previous stage (or the filter input) at FWL_IN bits; when the
// stage is narrower than the one before it, the value is quantised on the way
// in (truncation or rounding, as the filter's MODE), so only FWL fractional bits
// are stored. A stage wider than the one before it appends zero bits.
// Interface: en_i is the sample strobe; the register loads on the rising edge
// of clk when en_i is high and otherwise holds. rst_ni clears it to zero
// asynchronously (reset style and value are this design's choices).
// Timing: q_o is the quantised d_i of the last enabled edge, one sample late.
module nuwl_delay
  import nuwl_pkg::*;
#(
  parameter int unsigned IWL    = 1,
  parameter int unsigned FWL_IN = 14,
  parameter int unsigned FWL    = 12,
  parameter qmode_e      MODE   = Q_TRUNC
) (
  input  logic                      clk,
  input  logic                      rst_ni,
  input  logic                      en_i,
  input  logic signed [IWL+FWL_IN-1:0] d_i,
  output logic signed [IWL+FWL-1:0]    q_o,
  output logic                      sat_o   // quantiser saturated on this input
);
  logic signed [IWL+FWL-1:0] d_q;

  fxp_quantize #(.IWL(IWL), .FWL_IN(FWL_IN), .FWL_OUT(FWL), .MODE(MODE)) u_q (
    .d_i  (d_i),
    .q_o  (d_q),
    .sat_o(sat_o)
  );

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni)   q_o <= '0;
    else if (en_i) q_o <= d_q;
  end
endmodule
