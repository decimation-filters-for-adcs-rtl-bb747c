// tb_out_round: checks rounding of the 30-bit (22.8) accumulator to 20 bits.
// The expected value is computed with real arithmetic, floor(acc/256 + 0.5),
// then clipped to the 20-bit range; corner values around the halfway points
// and the clipping limits are tried besides random ones.
module tb_out_round;
  logic signed [29:0] acc;
  logic signed [19:0] out;
  logic sat;
  int checks = 0, failures = 0;

  out_round dut (.*);

  task automatic try(input longint a);
    longint e;
    bit es;
    acc = 30'(a);
    #1;
    e = longint'($floor(real'(a) / 256.0 + 0.5));
    es = 0;
    if (e > 524287) begin e = 524287; es = 1; end
    if (e < -524288) begin e = -524288; es = 1; end
    checks++;
    if (longint'(out) != e || sat != es) begin
      failures++;
      if (failures < 20) $display("FAIL: acc %0d -> %0d/%0b, expected %0d/%0b", a, out, sat, e, es);
    end
  endtask

  initial begin
    static longint corners[] = '{0, 127, 128, 129, -127, -128, -129, 255, 256, -256, -384, 384,
                          524287*256 + 127, 524287*256 + 128, -524288*256, -524288*256 - 128,
                          -524288*256 - 129, (1 << 29) - 1, -(1 << 29)};
    foreach (corners[i]) try(corners[i]);
    for (int i = 0; i < 20000; i++) try(longint'(signed'(30'($urandom))));
    for (int i = 0; i < 20000; i++) try(longint'($urandom_range(2 * (1 << 27))) - (1 << 27));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
