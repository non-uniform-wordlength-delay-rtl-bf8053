// tb_tap_add: self-checking test of the aligning adder of the accumulation chain.
//
// A 26-bit product with 24 fractional bits is added to a 34-bit partial sum
// with 31 fractional bits. The reference adds the two real values and scales
// the result by 2^31; the values are small enough for double precision to be
// exact, so the result must match bit for bit.
module tb_tap_add;
  int checks = 0, failures = 0;
  logic signed [25:0] p;
  logic signed [33:0] s, so;

  tap_add #(.P_W(26), .P_FWL(24), .S_W(34), .S_FWL(31)) dut (.p_i(p), .s_i(s), .s_o(so));

  task automatic apply(logic signed [25:0] x, logic signed [33:0] y);
    real e;
    p = x; s = y;
    #1;
    e = (real'(x) / (2.0 ** 24) + real'(y) / (2.0 ** 31)) * (2.0 ** 31);
    checks++;
    if (real'(so) != e) begin
      failures++;
      if (failures < 10) $display("FAIL p=%0d s=%0d: got %0d expected %0.1f", x, y, so, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(26'sh2000000, 34'sh0); apply(26'sh1ffffff, 34'sh0); apply(26'sh3ffffff, 34'sh1);
    for (int i = 0; i < 5000; i++) begin
      // Partial sums stay within +-2 (two of the three integer bits).
      apply(26'($urandom), 34'($signed(32'($urandom))) <<< 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
