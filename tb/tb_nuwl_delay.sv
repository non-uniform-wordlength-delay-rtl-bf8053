// tb_nuwl_delay: self-checking test of one delay-line register.
//
// Two registers are tested: a narrowing stage 14->12 bits with truncation (as
// z_9 of the default filter) and a rounding stage 14->12 bits. Random samples
// are applied with a random sample strobe; the testbench keeps its own copy of
// the expected register contents (floor or round-half-up of the sample, in real
// arithmetic) and checks after every clock that the register loaded only on
// strobed edges, holds otherwise, and clears on reset.
module tb_nuwl_delay;
  import nuwl_pkg::*;

  int checks = 0, failures = 0, holds = 0, loads = 0;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [14:0] d = '0;
  logic signed [12:0] q_t, q_r;
  logic st, sr;
  longint exp_t = 0, exp_r = 0;

  nuwl_delay #(.IWL(1), .FWL_IN(14), .FWL(12), .MODE(Q_TRUNC)) u_t (
    .clk(clk), .rst_ni(rst_n), .en_i(en), .d_i(d), .q_o(q_t), .sat_o(st));
  nuwl_delay #(.IWL(1), .FWL_IN(14), .FWL(12), .MODE(Q_ROUND)) u_r (
    .clk(clk), .rst_ni(rst_n), .en_i(en), .d_i(d), .q_o(q_r), .sat_o(sr));

  always #5 clk = ~clk;

  function automatic longint ref_q(longint code, bit rnd);
    real s = real'(code) / 4.0;
    longint r = rnd ? longint'($floor(s + 0.5)) : longint'($floor(s));
    if (r > 4095) r = 4095;
    return r;
  endfunction

  task automatic check(string what, longint got, longint exp);  // got is sign-extended
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Reset is held over the first edges (the flops have no defined start value).
    repeat (2) @(posedge clk);
    #1;
    check("reset trunc", longint'(q_t), 0);
    check("reset round", longint'(q_r), 0);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      d  = (i % 97 == 5) ? 15'sh3fff : 15'($urandom);
      if (en) begin
        exp_t = ref_q(longint'(d), 0);
        exp_r = ref_q(longint'(d), 1);
        loads++;
      end else holds++;
      @(posedge clk);
      #1;
      check("trunc", longint'(q_t), exp_t);
      check("round", longint'(q_r), exp_r);
    end
    // Asynchronous reset clears both registers.
    #2 rst_n = 1'b0;
    #1;
    check("reset trunc", longint'(q_t), 0);
    check("reset round", longint'(q_r), 0);
    checks++;
    if (loads == 0 || holds == 0) failures++;
    $display("loads %0d holds %0d", loads, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
