// tb_sine_workload: the audio workload of the design at its default size.
// A 1 Vrms (1.414 V peak) 5 kHz sine is sampled at 3 MHz by a behavioural
// second-order modulator with the reference signal gain 1/3, and the 64x
// decimated 20-bit outputs are compared with the ideal response
//   0.4714 * sum(h) * sin(2*pi*5 kHz * (t - 1202.5 input periods)),
// i.e. the full-scale peak of about +-494,000 codes delayed by the linear-phase
// group delay of (N-1)/2 input samples plus the modulator model's one sample. The tolerance, 0.3 % of full scale,
// covers passband ripple and modulator noise; a one-sample timing error would
// already be off by about 5,000 codes. No output may saturate, and both peaks
// must come within 1 % of the ideal amplitude.
module tb_sine_workload;
  localparam int    N       = 2406;
  localparam int    D       = 64;
  localparam int    SPACING = 20;
  localparam real   FS      = 3.0e6;
  localparam real   F0      = 5.0e3;
  localparam real   VPK     = 1.414;
  localparam real   PI      = 3.14159265358979;
  localparam int    NOUT    = 100;
  localparam real   MOD_DELAY = 1.0;  // the modulator model's output lags its input by one sample

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_bit;
  logic out_valid, out_sat, busy, overrun;
  logic signed [19:0] out_data;
  real  vin = 0.0;
  logic mod_en = 1'b0;

  always #5 clk = ~clk;

  sd_decimator dut (.*);
  sd_modulator_model #(.ORDER(2)) u_mod (.clk, .en(mod_en), .vin, .dout(in_bit));

  int checks = 0, failures = 0, nin = 0, nout = 0, n_sat = 0;
  int out_idx [$];           // input index of the newest bit of each output
  logic [22:0] half_rom [N / 2];
  real sum_h = 0.0, amp, maxv = -1.0e9, minv = 1.0e9;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      if (nin % D == D - 1 && nin >= N - 1) out_idx.push_back(nin);
      nin++;
    end
    if (rst_n && out_valid) begin
      int n;
      real ideal;
      n = out_idx.pop_front();
      ideal = amp * $sin(2.0 * PI * F0 * (real'(n) - (N - 1) / 2.0 - MOD_DELAY) / FS);
      nout++;
      if (out_sat) n_sat++;
      if (real'(out_data) > maxv) maxv = real'(out_data);
      if (real'(out_data) < minv) minv = real'(out_data);
      check((real'(out_data) - ideal) < 1573.0 && (ideal - real'(out_data)) < 1573.0,
            $sformatf("output %0d: %0d, ideal %f", nout, out_data, ideal));
    end
  end

  initial begin
    $readmemh("rtl/filter2_coef.hex", half_rom);
    for (int k = 0; k < N / 2; k++) sum_h += 2.0 * real'(signed'(half_rom[k])) / 256.0;
    amp = VPK / 3.0 * sum_h;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N + D * NOUT; i++) begin
      vin = VPK * $sin(2.0 * PI * F0 * real'(i) / FS);
      @(negedge clk); mod_en = 1'b1;
      @(negedge clk); mod_en = 1'b0;
      in_valid = 1'b1;
      @(negedge clk); in_valid = 1'b0;
      repeat (SPACING - 3) @(negedge clk);
    end
    repeat (N) @(negedge clk);
    $display("outputs=%0d max=%0.0f min=%0.0f ideal peak=%0.0f", nout, maxv, minv, amp);
    check(nout == NOUT, $sformatf("%0d outputs, expected %0d", nout, NOUT));
    check(n_sat == 0, "an output saturated");
    check(maxv > 0.99 * amp && maxv < 1.01 * amp, "positive peak off");
    check(minv < -0.99 * amp && minv > -1.01 * amp, "negative peak off");
    check(!overrun, "overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
