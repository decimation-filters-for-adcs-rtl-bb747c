// sd_modulator_model: behavioural stand-in for the analog sigma-delta modulator
// (not synthesizable; used only to make test streams).
//
// ORDER = 1: one integrator takes vin/G minus the fed-back output. ORDER = 2:
// two integrators with gains 1/2 (a textbook second-order loop, quieter in the
// audio band). The comparator emits +1 (dout = 1) or -1 (dout = 0). With
// feedback gain G = 3 the average output is vin/3, so a 1.414 V peak maps to a
// 0.4714 average, the signal gain of the reference modulator. The real
// modulator's loop filter is not modelled; only its in-band behaviour matters
// for the decimator tests. One output bit per rising clock edge with en high.
module sd_modulator_model #(
  parameter real G     = 3.0,
  parameter int  ORDER = 1
) (
  input  logic clk,
  input  logic en,
  input  real  vin,
  output logic dout
);
  real integ = 0.0, integ2 = 0.0;
  real fb;

  initial dout = 1'b0;

  always @(posedge clk) begin
    if (en) begin
      fb = dout ? 1.0 : -1.0;
      if (ORDER == 1) begin
        integ = integ + vin / G - fb;
        dout <= (integ >= 0.0);
      end else begin
        integ  = integ + 0.5 * (vin / G - fb);
        integ2 = integ2 + 0.5 * (integ - fb);
        dout <= (integ2 >= 0.0);
      end
    end
  end
endmodule
