// tb_coef_rom: checks the coefficient ROM's contents and read timing.
// Properties of the stored filter that do not depend on the table's source:
// the full 2406-tap response (both halves) sums to 2^20 within one unit, its
// largest coefficient is +15773.11 and smallest -3344.02, the sum of absolute
// values stays below 2^21 (accumulator guard bits), and the centre taps are the
// largest. Reads take one edge and hold while rd_en is low; each read is
// compared with the table read independently by the testbench.
module tb_coef_rom;
  localparam int H = 1203;
  localparam int AW = $clog2(H);

  logic clk = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] rd_addr = '0;
  logic signed [22:0] rd_data;
  logic [22:0] ref_tab [H];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  coef_rom dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    longint sum, abs_sum, mx, mn;
    int argmax;
    logic signed [22:0] held;
    $readmemh("rtl/filter2_coef.hex", ref_tab);
    sum = 0; abs_sum = 0; mx = -(longint'(1) << 30); mn = longint'(1) << 30; argmax = 0;
    for (int k = 0; k < H; k++) begin
      @(negedge clk); rd_en = 1'b1; rd_addr = AW'(k);
      @(posedge clk); #1;
      check(rd_data == signed'(ref_tab[k]), $sformatf("addr %0d", k));
      sum     += 2 * longint'(signed'(rd_data));
      abs_sum += 2 * ((rd_data < 0) ? -longint'(rd_data) : longint'(rd_data));
      if (longint'(rd_data) > mx) begin mx = longint'(rd_data); argmax = k; end
      if (longint'(rd_data) < mn) mn = longint'(rd_data);
    end
    // hold while rd_en is low
    held = rd_data;
    @(negedge clk); rd_en = 1'b0; rd_addr = '0;
    @(posedge clk); #1;
    check(rd_data == held, "output changed with rd_en low");
    // integer parts are in 1/256 units
    check(sum >= (longint'(1) << 28) - 256 && sum <= (longint'(1) << 28) + 256,
          $sformatf("sum of taps %0d not 2^20", sum / 256));
    check(abs_sum < (longint'(1) << 29), "sum of |h| reaches 2^21");
    check(mx == longint'(4037916), $sformatf("largest coefficient %0d/256", mx));
    check(mn == longint'(-856069), $sformatf("smallest coefficient %0d/256", mn));
    check(argmax == H - 1, $sformatf("largest coefficient at %0d", argmax));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
