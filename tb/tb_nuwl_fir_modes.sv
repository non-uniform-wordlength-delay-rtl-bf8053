// tb_nuwl_fir_modes: the filter in the four wordlength assignments evaluated
// for the 15-tap example: truncation and rounding, each with a uniform and a
// non-uniform delay line. All four run side by side on the same stimulus,
// uniformly distributed samples over [-1, 1) with the extreme codes mixed in
// and a random sample strobe. Each lane checks its outputs bit for bit against
// the reference model; this testbench then checks
//  - that each configuration's SQNR against the floating-point filter is within
//    2 dB of the 80 dB target;
//  - that rounding saturation occurred in both rounding configurations;
//  - the delay-register and delay-signal bit totals and the savings of the
//    non-uniform lines (fractional bits, as in the evaluation).
module tb_nuwl_fir_modes;
  import nuwl_pkg::*;

  localparam int NSAMP = 20000;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, x_valid = 1'b0;
  logic signed [15:0] x = '0;

  tb_fir_lane #(.MODE(Q_TRUNC), .SIG_FWL(NU_TRUNC_SIG), .DLY_FWL(NU_TRUNC_DLY)) l_nut (.*);
  tb_fir_lane #(.MODE(Q_TRUNC), .SIG_FWL(U_TRUNC_SIG),  .DLY_FWL(U_TRUNC_DLY))  l_ut  (.*);
  tb_fir_lane #(.MODE(Q_ROUND), .SIG_FWL(NU_ROUND_SIG), .DLY_FWL(NU_ROUND_DLY)) l_nur (.*);
  tb_fir_lane #(.MODE(Q_ROUND), .SIG_FWL(U_ROUND_SIG),  .DLY_FWL(U_ROUND_DLY))  l_ur  (.*);

  always #5 clk = ~clk;

  function automatic int fsum(fwl_tab_t t, bit skip0);
    int s = 0;
    for (int n = 0; n < NTAPS; n++) if (!(skip0 && n == 0)) s += t[n];
    return s;
  endfunction

  task automatic expect_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d, expected %0d", what, got, exp); end
  endtask

  task automatic report(string name, real sqnr);
    $display("%-28s SQNR %6.2f dB", name, sqnr);
    checks++;
    if (sqnr < 78.0) begin failures++; $display("FAIL %s: SQNR more than 2 dB below 80 dB", name); end
  endtask

  initial begin
    #(10 * NSAMP + 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < NSAMP; i++) begin
      @(negedge clk);
      x_valid = ($urandom_range(0, 5) != 0);
      case (i % 173)
        3:       x = 16'sh7fff;
        4:       x = 16'sh7ffe;
        9:       x = 16'sh8000;
        default: x = 16'($urandom);
      endcase
    end
    @(negedge clk) x_valid = 1'b0;
    repeat (2) @(negedge clk);

    // Fractional-bit totals of the four assignments and the savings they give.
    expect_int("trunc uniform signal bits",     fsum(U_TRUNC_SIG, 0), 210);
    expect_int("trunc non-uniform signal bits", fsum(NU_TRUNC_SIG, 0), 152);
    expect_int("trunc uniform delay bits",      fsum(U_TRUNC_DLY, 1), 196);
    expect_int("trunc non-uniform delay bits",  fsum(NU_TRUNC_DLY, 1), 167);
    expect_int("round uniform signal bits",     fsum(U_ROUND_SIG, 0), 195);
    expect_int("round non-uniform signal bits", fsum(NU_ROUND_SIG, 0), 156);
    expect_int("round uniform delay bits",      fsum(U_ROUND_DLY, 1), 182);
    expect_int("round non-uniform delay bits",  fsum(NU_ROUND_DLY, 1), 169);
    $display("saving, truncation: signals %0.2f %%, delays %0.2f %%",
             100.0 * (210 - 152) / 210.0, 100.0 * (196 - 167) / 196.0);
    $display("saving, rounding:   signals %0.2f %%, delays %0.2f %%",
             100.0 * (195 - 156) / 195.0, 100.0 * (182 - 169) / 182.0);
    $display("delay register bits incl. sign: NU-T %0d U-T %0d NU-R %0d U-R %0d",
             l_nut.dly_bits(), l_ut.dly_bits(), l_nur.dly_bits(), l_ur.dly_bits());

    report("truncation, non-uniform", l_nut.mdl.sqnr_db());
    report("truncation, uniform",     l_ut.mdl.sqnr_db());
    report("rounding, non-uniform",   l_nur.mdl.sqnr_db());
    report("rounding, uniform",       l_ur.mdl.sqnr_db());

    checks++;
    if (l_nur.sat_hw == 0 || l_ur.sat_hw == 0) begin
      failures++; $display("FAIL: rounding saturation never occurred");
    end
    checks++;
    if (l_nut.outputs == 0 || l_nut.outputs != l_ur.outputs) failures++;
    $display("outputs per lane %0d, saturations NU-R %0d U-R %0d",
             l_nut.outputs, l_nur.sat_hw, l_ur.sat_hw);

    checks   += l_nut.checks + l_ut.checks + l_nur.checks + l_ur.checks;
    failures += l_nut.failures + l_ut.failures + l_nur.failures + l_ur.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
