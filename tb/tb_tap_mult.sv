// tb_tap_mult: self-checking test of the full-precision tap multiplier.
//
// An 8-bit delay signal is multiplied by an 18-bit coefficient; every product
// must equal the integer product computed in the testbench, including the
// extreme codes (most negative times most negative needs every output bit).
module tb_tap_mult;
  int checks = 0, failures = 0;
  logic signed [7:0]  a;
  logic signed [17:0] b;
  logic signed [25:0] p;

  tap_mult #(.A_W(8), .B_W(18)) dut (.a_i(a), .b_i(b), .p_o(p));

  task automatic apply(logic signed [7:0] x, logic signed [17:0] y);
    longint e;
    a = x; b = y;
    #1;
    e = longint'(x) * longint'(y);
    checks++;
    if (longint'(p) != e) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d: got %0d expected %0d", x, y, p, e);
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
    apply(8'sh80, 18'sh20000); apply(8'sh7f, 18'sh1ffff); apply(8'sh80, 18'sh1ffff);
    apply(8'sh00, 18'sh12345); apply(8'shff, 18'sh3ffff);
    for (int i = 0; i < 5000; i++) apply(8'($urandom), 18'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
