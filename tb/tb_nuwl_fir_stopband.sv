// tb_nuwl_fir_stopband: magnitude response of the hardware filter at spot
// frequencies, for the non-uniform (default) and the uniform truncation delay
// lines side by side.
//
// A sinusoid of amplitude 0.9 at frequency f (in cycles per sample) is fed as
// <s,1,15> samples, one per clock. After the 15-sample start-up the output is
// correlated with cos and sin at f over M samples, which gives the output
// amplitude at f while rejecting the quantisation noise spread over other
// frequencies. The gain is 20*log10(output amplitude / input amplitude).
// Checks: every stopband frequency (0.30 .. 0.50) is below -60 dB in both
// configurations, the attenuation specification of the example filter, and the
// low-frequency passband gain is within 0.1 dB of 0 dB.
module tb_nuwl_fir_stopband;
  import nuwl_pkg::*;

  localparam int  M    = 4000;
  localparam real AMP  = 0.9;
  localparam real PI   = 3.14159265358979;
  localparam int  NF   = 9;
  localparam real FREQ [NF] = '{0.01, 0.02, 0.30, 0.33, 0.35, 0.37, 0.40, 0.45, 0.49};

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, x_valid = 1'b0;
  logic signed [15:0] x = '0;
  logic        yv_nu, yv_u, s_nu, s_u;
  logic signed [33:0] y_nu, y_u;

  nuwl_fir u_nu (
    .clk(clk), .rst_ni(rst_n), .x_valid_i(x_valid), .x_i(x),
    .y_valid_o(yv_nu), .y_o(y_nu), .sat_o(s_nu));
  nuwl_fir #(.SIG_FWL(U_TRUNC_SIG), .DLY_FWL(U_TRUNC_DLY)) u_u (
    .clk(clk), .rst_ni(rst_n), .x_valid_i(x_valid), .x_i(x),
    .y_valid_o(yv_u), .y_o(y_u), .sat_o(s_u));

  always #5 clk = ~clk;

  initial begin
    #(10 * (M + 40) * NF + 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ci_nu, cq_nu, ci_u, cq_u, g_nu, g_u, ph, f;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int fi = 0; fi < NF; fi++) begin
      f = FREQ[fi];
      ci_nu = 0.0; cq_nu = 0.0; ci_u = 0.0; cq_u = 0.0;
      for (int k = 0; k < M + 20; k++) begin
        @(negedge clk);
        // y_o now holds the output for sample k-1.
        if (k > 20) begin
          ph = 2.0 * PI * f * real'(k - 1);
          ci_nu += real'(y_nu) / (2.0 ** 31) * $cos(ph);
          cq_nu += real'(y_nu) / (2.0 ** 31) * $sin(ph);
          ci_u  += real'(y_u)  / (2.0 ** 31) * $cos(ph);
          cq_u  += real'(y_u)  / (2.0 ** 31) * $sin(ph);
        end
        x_valid = 1'b1;
        x = 16'($rtoi($floor(AMP * $sin(2.0 * PI * f * real'(k)) * 32768.0)));
      end
      g_nu = 20.0 * $log10(2.0 * $sqrt(ci_nu * ci_nu + cq_nu * cq_nu) / real'(M - 1) / AMP);
      g_u  = 20.0 * $log10(2.0 * $sqrt(ci_u * ci_u + cq_u * cq_u) / real'(M - 1) / AMP);
      $display("f = %0.2f: non-uniform %7.2f dB, uniform %7.2f dB", f, g_nu, g_u);
      checks += 2;
      if (f < 0.1) begin
        if (g_nu > 0.1 || g_nu < -0.1) begin failures++; $display("FAIL passband gain (non-uniform)"); end
        if (g_u  > 0.1 || g_u  < -0.1) begin failures++; $display("FAIL passband gain (uniform)"); end
      end else begin
        if (g_nu > -60.0) begin failures++; $display("FAIL stopband above -60 dB (non-uniform)"); end
        if (g_u  > -60.0) begin failures++; $display("FAIL stopband above -60 dB (uniform)"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
