// tb_fxp_quantize: self-checking test of the fixed-point requantiser.
//
// Four instances cover the cases the filter uses: truncation 15->7 bits,
// rounding 15->8 bits, rounding 14->12 bits and widening 10->11 bits, all with
// one integer (sign) bit. Random inputs plus the extreme codes are applied and
// each output is compared with a reference computed in real arithmetic:
// floor(v*2^f) for truncation, floor(v*2^f + 1/2) clipped to the largest code
// for rounding. The clipping flag is checked too and must be seen at least once.
module tb_fxp_quantize;
  import nuwl_pkg::*;

  int checks = 0, failures = 0, sat_seen = 0;

  logic signed [15:0] a16;  // <s,1,15>
  logic signed [14:0] a15;  // <s,1,14>
  logic signed [10:0] a11;  // <s,1,10>
  logic signed [7:0]  t_q;
  logic signed [8:0]  r_q;
  logic signed [12:0] r2_q;
  logic signed [11:0] w_q;
  logic t_s, r_s, r2_s, w_s;

  fxp_quantize #(.IWL(1), .FWL_IN(15), .FWL_OUT(7),  .MODE(Q_TRUNC)) u_t  (.d_i(a16), .q_o(t_q),  .sat_o(t_s));
  fxp_quantize #(.IWL(1), .FWL_IN(15), .FWL_OUT(8),  .MODE(Q_ROUND)) u_r  (.d_i(a16), .q_o(r_q),  .sat_o(r_s));
  fxp_quantize #(.IWL(1), .FWL_IN(14), .FWL_OUT(12), .MODE(Q_ROUND)) u_r2 (.d_i(a15), .q_o(r2_q), .sat_o(r2_s));
  fxp_quantize #(.IWL(1), .FWL_IN(10), .FWL_OUT(11), .MODE(Q_ROUND)) u_w  (.d_i(a11), .q_o(w_q),  .sat_o(w_s));

  function automatic longint ref_q(longint code, int fin, int fout, bit rnd, output bit sat);
    real v = real'(code) / (2.0 ** fin);
    real s = v * (2.0 ** fout);
    longint r = rnd ? longint'($floor(s + 0.5)) : longint'($floor(s));
    longint mx = (longint'(1) << fout) - 1;   // largest code of <s,1,fout>
    sat = 1'b0;
    if (r > mx) begin r = mx; sat = 1'b1; end
    return r;
  endfunction

  task automatic check(string what, longint got, longint exp, bit gsat, bit esat);
    checks++;
    if (got != exp || gsat != esat) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d sat %0b, expected %0d sat %0b", what, got, gsat, exp, esat);
    end
  endtask

  task automatic apply(logic signed [15:0] v);
    bit es;
    longint e;
    a16 = v;
    a15 = v[15:1];
    a11 = v[15:5];
    #1;
    e = ref_q(a16, 15, 7, 0, es);  check("trunc 15->7", t_q, e, t_s, es);
    e = ref_q(a16, 15, 8, 1, es);  check("round 15->8", r_q, e, r_s, es);
    if (es) sat_seen++;
    e = ref_q(a15, 14, 12, 1, es); check("round 14->12", r2_q, e, r2_s, es);
    if (es) sat_seen++;
    e = ref_q(a11, 10, 11, 1, es); check("widen 10->11", w_q, e, w_s, es);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(16'sh7fff); apply(16'sh8000); apply(16'sh0000); apply(16'shffff);
    apply(16'sh7ff0); apply(16'sh0080); apply(16'sh0040); apply(16'shffc0);
    for (int i = 0; i < 4000; i++) apply(16'($urandom));
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("saturations seen: %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
