// tap_add: one adder of the filter's accumulation chain.
//
// Adds a product p_i <s, P_W-P_FWL, P_FWL> to a partial sum s_i with S_FWL
// fractional bits and S_W bits in all. Products of different taps have
// different fractional wordlengths, so p_i is first aligned to the binary point
// of the sum by appending S_FWL-P_FWL zero bits and sign-extending. No bits are
// dropped (S_FWL must be at least P_FWL), matching a filter in which only the
// delay signals are quantised. S_W must leave room for the sum: the integer
// part is sized by the caller. Combinational.
module tap_add #(
  parameter int unsigned P_W   = 26,
  parameter int unsigned P_FWL = 24,
  parameter int unsigned S_W   = 34,
  parameter int unsigned S_FWL = 31
) (
  input  logic signed [P_W-1:0] p_i,
  input  logic signed [S_W-1:0] s_i,
  output logic signed [S_W-1:0] s_o
);
  localparam int unsigned SH = S_FWL - P_FWL;

  logic signed [S_W-1:0] p_al;

  always_comb begin
    p_al = S_W'(p_i) <<< SH;
    s_o  = s_i + p_al;
  end

  initial begin
    assert (S_FWL >= P_FWL) else $error("tap_add: sum has fewer fractional bits than product");
    assert (S_W - S_FWL >= P_W - P_FWL) else $error("tap_add: sum has fewer integer bits than product");
  end
endmodule
