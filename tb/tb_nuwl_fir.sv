// tb_nuwl_fir: end-to-end test of the filter in its default configuration
// (15 taps, truncation, non-uniform delay line), with no parameter overrides.
//
// Stimulus: uniformly distributed random samples over [-1, 1) in <s,1,15>, the
// stimulus the wordlengths were chosen for, with the extreme codes mixed in,
// a random sample strobe (gaps between samples) and one reset in mid-run.
// Checks:
//  - every output equals the bit-exact reference model (tb_fir_ref_pkg);
//  - y_valid_o follows each strobe by exactly one clock, and y_o holds between;
//  - the delay line is empty again after reset;
//  - the SQNR against the floating-point filter is within 2 dB of the 80 dB
//    target the wordlengths were chosen for (floor truncation of these
//    wordlengths gives about 79 dB on this stimulus).
// Mechanisms that must occur at least once: bits dropped by a delay signal,
// bits dropped where the delay line narrows, a held (unstrobed) cycle, and a
// reset in mid-stream.
module tb_nuwl_fir;
  import nuwl_pkg::*;
  import tb_fir_ref_pkg::*;

  localparam int NSAMP = 20000;

  int checks = 0, failures = 0, holds = 0, resets = 0, outputs = 0;
  logic clk = 1'b0, rst_n = 1'b0, x_valid = 1'b0;
  logic signed [15:0] x = '0;
  logic        y_valid, sat;
  logic signed [33:0] y;
  logic signed [33:0] y_prev;
  real   exp_y, exp_yf;
  bit    exp_sat, pend;
  fir_ref mdl;

  nuwl_fir dut (
    .clk(clk), .rst_ni(rst_n), .x_valid_i(x_valid), .x_i(x),
    .y_valid_o(y_valid), .y_o(y), .sat_o(sat)
  );

  always #5 clk = ~clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #(10 * 3 * NSAMP + 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mdl = new(Q_TRUNC, NU_TRUNC_SIG, NU_TRUNC_DLY);
    pend = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < NSAMP; i++) begin
      @(negedge clk);
      // Result of the previous edge.
      if (pend) begin
        check("y_valid after strobe", y_valid == 1'b1);
        check("y value", real'(y) == exp_y * (2.0 ** 31));
        check("sat flag", sat == 1'b0);
        if (real'(y) != exp_y * (2.0 ** 31) && failures < 10)
          $display("  got %0d expected %0.1f", y, exp_y * (2.0 ** 31));
        if (i > 40) mdl.add_power(exp_y, exp_yf);
        outputs++;
      end else if (i > 0) begin
        check("no y_valid without strobe", y_valid == 1'b0);
        check("y holds", y == y_prev);
      end
      y_prev = y;
      if (i == NSAMP / 2) begin
        // Reset in mid-stream: line and output clear.
        rst_n = 1'b0;
        #1;
        check("reset clears output", y == '0 && y_valid == 1'b0);
        rst_n = 1'b1;
        mdl.reset();
        resets++;
        y_prev = '0;
      end
      x_valid = ($urandom_range(0, 4) != 0);
      case (i % 251)
        7:       x = 16'sh7fff;
        8:       x = 16'sh8000;
        default: x = 16'($urandom);
      endcase
      pend = x_valid;
      if (x_valid) exp_y = mdl.step(real'(x) / 32768.0, exp_yf, exp_sat);
      else holds++;
    end
    @(negedge clk);
    x_valid = 1'b0;
    checks++;
    if (mdl.drop_cnt == 0)     begin failures++; $display("FAIL: no delay-signal truncation"); end
    checks++;
    if (mdl.dly_drop_cnt == 0) begin failures++; $display("FAIL: no narrowing on the delay line"); end
    checks++;
    if (holds == 0 || resets == 0) begin failures++; $display("FAIL: hold or reset not exercised"); end
    checks++;
    if (mdl.sqnr_db() < 78.0) begin failures++; $display("FAIL: SQNR more than 2 dB below the 80 dB target"); end
    $display("outputs %0d holds %0d resets %0d signal drops %0d delay drops %0d",
             outputs, holds, resets, mdl.drop_cnt, mdl.dly_drop_cnt);
    $display("SQNR (truncation, non-uniform) = %0.2f dB", mdl.sqnr_db());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
