// tb_fir_lane: one filter configuration under test, for tb_nuwl_fir_modes.
//
// Instantiates nuwl_fir with the given quantisation mode and wordlength tables
// and a reference model with the same settings. The parent drives the shared
// clock, reset, strobe and samples; on every falling edge this lane checks the
// result of the previous rising edge: the bit-exact output, the saturation
// flag and the one-clock latency of y_valid_o. It accumulates the SQNR
// against the floating-point filter. Counters are read by the parent.
module tb_fir_lane
  import nuwl_pkg::*;
  import tb_fir_ref_pkg::*;
#(
  parameter qmode_e   MODE    = Q_TRUNC,
  parameter fwl_tab_t SIG_FWL = NU_TRUNC_SIG,
  parameter fwl_tab_t DLY_FWL = NU_TRUNC_DLY
) (
  input logic               clk,
  input logic               rst_n,
  input logic               x_valid,
  input logic signed [15:0] x
);
  localparam int unsigned Y_FWL = tab_max(SIG_FWL, 1'b0) + COEF_FWL;
  localparam int unsigned Y_W   = ACC_IWL + Y_FWL;

  int checks = 0, failures = 0, sat_hw = 0, outputs = 0;
  logic               y_valid, sat;
  logic signed [Y_W-1:0] y;
  real    exp_y, exp_yf;
  bit     exp_sat, pend = 1'b0;
  fir_ref mdl = new(MODE, SIG_FWL, DLY_FWL);

  nuwl_fir #(.MODE(MODE), .SIG_FWL(SIG_FWL), .DLY_FWL(DLY_FWL)) dut (
    .clk(clk), .rst_ni(rst_n), .x_valid_i(x_valid), .x_i(x),
    .y_valid_o(y_valid), .y_o(y), .sat_o(sat)
  );

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 6) $display("FAIL lane %s: %s at %0t", MODE.name(), what, $time);
    end
  endtask

  // Register bits of the delay line and of the delay signals (sign bit included).
  function automatic int dly_bits();
    int s = 0;
    for (int n = 1; n < NTAPS; n++) s += 1 + DLY_FWL[n];
    return s;
  endfunction

  always @(negedge clk) begin
    if (!rst_n) begin
      mdl.reset();
      pend = 1'b0;
    end else begin
      if (pend) begin
        check("y_valid one clock after strobe", y_valid == 1'b1);
        check("y value", real'(y) == exp_y * (2.0 ** Y_FWL));
        check("sat flag", sat == exp_sat);
        if (sat) sat_hw++;
        mdl.add_power(exp_y, exp_yf);
        outputs++;
      end else begin
        check("no y_valid without strobe", y_valid == 1'b0);
      end
      // Sample the parent's inputs for the coming rising edge after it has set them.
      #2;
      pend = x_valid;
      if (x_valid) exp_y = mdl.step(real'(x) / 32768.0, exp_yf, exp_sat);
    end
  end
endmodule
