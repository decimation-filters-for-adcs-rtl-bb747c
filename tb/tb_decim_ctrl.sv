// tb_decim_ctrl: checks the sequencer with a small filter (10 taps, decimate by 4).
// A model of the circular buffer predicts, for every accepted start, the five
// address pairs (newest-k, oldest+k) and coefficient addresses k = 0..4, issued
// on the five cycles after the start edge, acc_en one cycle later, and
// result_valid rising on edge 6; results before the buffer holds 10 bits must come
// without result_primed. Inputs come at random spacing, including bursts that
// must set overrun.
module tb_decim_ctrl;
  localparam int N = 10, H = N / 2, D = 4;
  localparam int AW = $clog2(N), CW = $clog2(H);

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic mem_wr_en, rd_en, acc_clear, acc_en, result_valid, result_primed, busy, overrun;
  logic [AW-1:0] mem_wr_addr, rd_addr_a, rd_addr_b;
  logic [CW-1:0] coef_addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  decim_ctrl #(.N_TAPS(N), .DECIM(D)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // model state
  int cyc = 0, wp = 0, nin = 0, last_start = -1000, run_left = 0, kk = 0;
  int a_addr = 0, b_addr = 0;
  int n_starts = 0, n_drop = 0, n_results = 0, n_unprimed = 0;
  bit exp_en_next = 0, exp_result [int];
  bit exp_primed [int];
  bit m_overrun = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      // outputs seen before this edge
      check(mem_wr_en == in_valid, "mem_wr_en");
      if (in_valid) check(int'(mem_wr_addr) == wp, $sformatf("wr_addr %0d expected %0d", mem_wr_addr, wp));
      check(rd_en == (run_left > 0), "rd_en");
      if (run_left > 0) begin
        check(int'(coef_addr) == kk, $sformatf("coef_addr %0d expected %0d", coef_addr, kk));
        check(int'(rd_addr_a) == a_addr, $sformatf("rd_addr_a %0d expected %0d", rd_addr_a, a_addr));
        check(int'(rd_addr_b) == b_addr, $sformatf("rd_addr_b %0d expected %0d", rd_addr_b, b_addr));
      end
      check(acc_en == exp_en_next, "acc_en");
      check(result_valid == exp_result.exists(cyc), "result_valid");
      if (result_valid) begin
        n_results++;
        check(result_primed == exp_primed[cyc], "result_primed");
        if (!result_primed) n_unprimed++;
      end
      check(overrun == m_overrun, "overrun");
      // advance the model across this edge
      exp_en_next = (run_left > 0);
      if (run_left > 0) begin
        run_left--; kk++;
        a_addr = (a_addr == 0) ? N - 1 : a_addr - 1;
        b_addr = (b_addr == N - 1) ? 0 : b_addr + 1;
      end
      if (in_valid) begin
        if (nin % D == D - 1) begin
          if (cyc - last_start < H + 2) begin m_overrun = 1; n_drop++; end
          else begin
            last_start = cyc; n_starts++;
            run_left = H; kk = 0;
            a_addr = wp; b_addr = (wp + 1) % N;
            exp_result[cyc + H + 2] = 1;   // rises on edge H+1, seen on edge H+2
            exp_primed[cyc + H + 2] = (nin + 1 >= N);
            check(acc_clear, "acc_clear missing at start");
          end
        end
        wp = (wp + 1) % N;
        nin++;
      end
    end
    cyc++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(9) < ((i / 500) % 2 == 0 ? 2 : 8));
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (20) @(negedge clk);
    $display("starts=%0d dropped=%0d results=%0d unprimed=%0d", n_starts, n_drop, n_results, n_unprimed);
    check(n_starts > 10 && n_drop > 0 && n_unprimed > 0, "not every case seen");
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
