// tb_sym_mac: checks the pre-adder and accumulator.
// Random sample pairs and 23-bit coefficients are fed with random enables and
// clears; an integer model adds 2*coef when both samples are +1, subtracts it
// when both are -1 and holds otherwise. Long runs of identical pairs drive the
// accumulator towards its +-2^21 integer range to exercise the guard bits.
module tb_sym_mac;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, en = 1'b0, smp_a = 1'b0, smp_b = 1'b0;
  logic signed [22:0] coef = '0;
  logic signed [29:0] acc;
  longint model = 0;
  int checks = 0, failures = 0;
  int n_plus = 0, n_minus = 0, n_zero = 0;

  always #5 clk = ~clk;

  sym_mac dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic step(input bit c, input bit e, input bit a, input bit b, input longint h);
    @(negedge clk);
    clear = c; en = e; smp_a = a; smp_b = b; coef = 23'(h);
    if (c) model = 0;
    else if (e) begin
      if (a && b) begin model += 2 * h; n_plus++; end
      else if (!a && !b) begin model -= 2 * h; n_minus++; end
      else n_zero++;
    end
    @(posedge clk); #1;
    check(longint'(acc) == model, $sformatf("acc %0d expected %0d", acc, model));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(acc == 0, "not zero after reset");
    for (int i = 0; i < 20000; i++)
      step(($urandom_range(99) == 0), ($urandom_range(3) != 0), 1'($urandom), 1'($urandom),
           longint'($urandom_range(2 * 4096 * 256)) - 4096 * 256);
    // large excursions: both +1 with the largest coefficient, then both -1
    step(1, 0, 0, 0, 0);
    for (int i = 0; i < 66; i++) step(0, 1, 1, 1, 4037916);    // to +2.07e6, near +2^21
    for (int i = 0; i < 132; i++) step(0, 1, 0, 0, 4037916);   // to -2.07e6, near -2^21
    // clear wins over en
    step(1, 1, 1, 1, 1000);
    $display("pairs: plus=%0d minus=%0d zero=%0d", n_plus, n_minus, n_zero);
    check(n_plus > 0 && n_minus > 0 && n_zero > 0, "not all pre-add cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
