// tb_sd_decimator: end-to-end test of the decimation filter at its default size
// (2406 taps, decimation by 64, 20-bit output).
//
// Input bits arrive every SPACING clocks (20, just above the 18.8 minimum). A
// reference model keeps every input bit and the full 2406-tap impulse response
// (rebuilt from the stored half), computes each output as a plain FIR sum
// without the symmetry trick, rounds half up and saturates, and the DUT's
// outputs must match it exactly, in order, rising N/2 + 2 edges after the edge that takes every 64th bit.
// Phases: random bits; a modulated dc input (also checked against the ideal
// gain vin/3 * sum(h)); all +1 and all -1 (saturation); 64 bits per 1205 clocks,
// the highest sustained rate, which must not overrun; a burst of one bit per
// clock (overrun, with dropped outputs predicted by the model). The model counts
// each mechanism: outputs, +2/0/-2 pre-add cases, round-up, positive and
// negative saturation, the suppressed outputs before the memory is full, and
// overrun; a mechanism that never happens is a failure.
module tb_sd_decimator;
  localparam int N       = 2406;
  localparam int H       = N / 2;
  localparam int D       = 64;
  localparam int SPACING = 20;
  localparam int LAT     = H + 3;     // out_valid rises on edge H+2 and is seen on edge H+3
  localparam int MAXIN   = 16000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_bit = 1'b0;
  logic out_valid, out_sat, busy, overrun;
  logic signed [19:0] out_data;

  always #5 clk = ~clk;

  sd_decimator dut (.*);

  // behavioural modulator for the dc phase
  real  vin = 0.0;
  logic mod_en = 1'b0, mod_bit;
  sd_modulator_model u_mod (.clk, .en(mod_en), .vin, .dout(mod_bit));

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;

  // reference data
  logic [22:0] half_rom [H];
  longint h [N];
  longint sum_h = 0;
  bit     xs [MAXIN];
  int     nin = 0;

  // expected outputs
  typedef struct { longint y; bit sat; longint unsigned due; real vin; bit dc; } exp_t;
  exp_t expq[$];
  longint unsigned last_start = 0;
  bit     any_start = 0;
  bit     dc_phase = 0;

  // mechanism counters
  int n_out = 0, n_plus = 0, n_zero = 0, n_minus = 0, n_roundup = 0;
  int n_sat_pos = 0, n_sat_neg = 0, n_unprimed = 0, n_dropped = 0, n_dc = 0, n_min_rate = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // model one accepted start: output over the newest N bits ending at index n
  task automatic model_output(input int n, input longint unsigned c);
    longint acc = 0;
    longint r;
    exp_t e;
    for (int j = 0; j < N; j++) acc += xs[n - j] ? h[j] : -h[j];
    for (int k = 0; k < H; k++) begin
      if (xs[n - k] && xs[n - N + 1 + k]) n_plus++;
      else if (!xs[n - k] && !xs[n - N + 1 + k]) n_minus++;
      else n_zero++;
    end
    if (acc[7]) n_roundup++;
    r = (acc + 128) >>> 8;
    e.sat = 1'b0;
    if (r > 524287) begin r = 524287; e.sat = 1'b1; n_sat_pos++; end
    else if (r < -524288) begin r = -524288; e.sat = 1'b1; n_sat_neg++; end
    e.y = r; e.due = c + LAT; e.vin = vin; e.dc = dc_phase;
    expq.push_back(e);
  endtask

  // observe the DUT's inputs and outputs on every edge
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid) begin
      xs[nin] = in_bit;
      if (nin % D == D - 1) begin
        if (any_start && (cyc - last_start) < H + 2) begin
          n_dropped++;
        end else begin
          any_start = 1;
          last_start = cyc;
          if (nin >= N - 1) model_output(nin, cyc);
          else n_unprimed++;
        end
      end
      nin++;
    end
    if (rst_n && out_valid) begin
      exp_t e;
      n_out++;
      if (expq.size() == 0) check(0, "unexpected output");
      else begin
        e = expq.pop_front();
        check(out_data == 20'(e.y),
              $sformatf("output %0d: got %0d expected %0d", n_out, out_data, e.y));
        check(out_sat == e.sat, $sformatf("output %0d: sat %0b expected %0b", n_out, out_sat, e.sat));
        check(cyc == e.due, $sformatf("output %0d: at edge %0d expected %0d", n_out, cyc, e.due));
        if (e.dc) begin
          real ideal;
          ideal = e.vin / 3.0 * real'(sum_h) / 256.0;
          n_dc++;
          check((real'(out_data) - ideal) < 600.0 && (ideal - real'(out_data)) < 600.0,
                $sformatf("dc output %0d far from ideal %f", out_data, ideal));
        end
      end
    end
  end

  task automatic send(input bit b, input int gap);
    @(negedge clk);
    in_valid = 1'b1;
    in_bit   = b;
    @(negedge clk);
    in_valid = 1'b0;
    repeat (gap - 2) @(negedge clk);
  endtask

  task automatic send_mod(input int count);
    for (int i = 0; i < count; i++) begin
      @(negedge clk);
      mod_en = 1'b1;
      @(negedge clk);
      mod_en = 1'b0;
      send(mod_bit, SPACING - 1);
    end
  endtask

  initial begin
    $readmemh("rtl/filter2_coef.hex", half_rom);
    for (int k = 0; k < H; k++) begin
      h[k]         = longint'(signed'(half_rom[k]));
      h[N - 1 - k] = h[k];
      sum_h       += 2 * h[k];
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1: random bits
    for (int i = 0; i < N + 10 * D; i++) send(1'($urandom), SPACING);
    // 2: modulated dc input, 1.2 V
    vin = 1.2;
    send_mod(N);
    dc_phase = 1;
    send_mod(6 * D);
    dc_phase = 0;
    // 3: all +1, then all -1: beyond the 20-bit range
    for (int i = 0; i < N + 3 * D; i++) send(1'b1, SPACING);
    for (int i = 0; i < N + 3 * D; i++) send(1'b0, SPACING);
    // 4: random bits at the highest sustained rate: every 64 bits span exactly
    //    N/2 + 2 = 1205 clocks (53 gaps of 19 clocks, 11 of 18); no overrun allowed
    for (int i = 0; i < 8 * D; i++) begin
      send(1'($urandom), (i % D < 53) ? 19 : 18);
      if (i % D == D - 1) n_min_rate++;
    end
    check(!overrun, "overrun flagged at the highest sustained rate");
    // 5: a burst of one bit per clock
    for (int i = 0; i < 4 * D; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_bit   = 1'($urandom);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (H + 10) @(negedge clk);
    check(overrun, "overrun not flagged after the burst");
    check(expq.size() == 0, "outputs still missing at the end");

    $display("mechanisms: outputs=%0d plus2=%0d zero=%0d minus2=%0d roundup=%0d sat_pos=%0d sat_neg=%0d unprimed=%0d dropped=%0d dc=%0d",
             n_out, n_plus, n_zero, n_minus, n_roundup, n_sat_pos, n_sat_neg, n_unprimed, n_dropped, n_dc);
    check(n_out > 0,      "no output produced");
    check(n_plus > 0,     "pre-add +2 never happened");
    check(n_zero > 0,     "pre-add 0 never happened");
    check(n_minus > 0,    "pre-add -2 never happened");
    check(n_roundup > 0,  "rounding up never happened");
    check(n_sat_pos > 0,  "positive saturation never happened");
    check(n_sat_neg > 0,  "negative saturation never happened");
    check(n_unprimed > 0, "no output suppressed before the memory filled");
    check(n_dropped > 0,  "no start dropped by overrun");
    check(n_dc > 0,       "no dc output checked");
    check(n_min_rate > 0, "highest sustained rate never run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
