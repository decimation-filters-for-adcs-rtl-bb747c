// tb_sample_mem: checks the two-read-port circular data memory.
// Writes random bits to random addresses while both ports read random
// addresses, and compares every read with a shadow copy kept by the testbench:
// data appear one edge after rd_en, hold while rd_en is low, and a read of the
// address written in the same cycle returns the old bit.
module tb_sample_mem;
  localparam int DEPTH = 2406;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic wr_en = 1'b0, wr_data = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr_a = '0, rd_addr_b = '0;
  logic rd_data_a, rd_data_b;
  int checks = 0, failures = 0;
  bit shadow [DEPTH];

  always #5 clk = ~clk;

  sample_mem #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    bit exp_a, exp_b;
    // fill every location
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(i); wr_data = 1'($urandom); shadow[i] = wr_data;
    end
    @(negedge clk); wr_en = 1'b0;
    // first read, so that both outputs hold known bits
    rd_en = 1'b1; rd_addr_a = '0; rd_addr_b = AW'(DEPTH - 1);
    exp_a = shadow[0]; exp_b = shadow[DEPTH - 1];
    @(posedge clk); #1;
    check(rd_data_a == exp_a && rd_data_b == exp_b, "first read");
    // random traffic
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      wr_en     = 1'($urandom);
      wr_addr   = AW'($urandom_range(DEPTH - 1));
      wr_data   = 1'($urandom);
      rd_en     = ($urandom_range(3) != 0);
      rd_addr_a = AW'($urandom_range(DEPTH - 1));
      rd_addr_b = ($urandom_range(7) == 0) ? wr_addr : AW'($urandom_range(DEPTH - 1));
      if (rd_en) begin
        exp_a = shadow[rd_addr_a];   // old data, before this cycle's write
        exp_b = shadow[rd_addr_b];
      end
      if (wr_en) shadow[wr_addr] = wr_data;
      @(posedge clk); #1;
      check(rd_data_a == exp_a, $sformatf("port a addr %0d", rd_addr_a));
      check(rd_data_b == exp_b, $sformatf("port b addr %0d", rd_addr_b));
    end
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
