// tap_mult: full-precision signed multiplier of one filter tap.
//
// Multiplies the delay signal a_i <s, A_IWL, A_FWL> by the coefficient b_i
// <s, B_IWL, B_FWL>. The product keeps every bit: its wordlength is the sum of
// the input wordlengths, <s, A_IWL+B_IWL, A_FWL+B_FWL>, so a shorter delay
// signal directly gives a shorter multiplier and product. Combinational.
module tap_mult #(
  parameter int unsigned A_W = 8,
  parameter int unsigned B_W = 18
) (
  input  logic signed [A_W-1:0]     a_i,
  input  logic signed [B_W-1:0]     b_i,
  output logic signed [A_W+B_W-1:0] p_o
);
  always_comb p_o = (A_W+B_W)'(a_i) * (A_W+B_W)'(b_i);
endmodule
