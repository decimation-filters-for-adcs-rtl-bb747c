// out_round: converts the accumulator to the ADC output word.
//
// The accumulator holds FRAC_W fraction bits below the output LSB. Following the
// reference bit map, the output is the accumulator rounded at the 2^0 point:
// half an LSB (2^(FRAC_W-1)) is added and the fraction bits are dropped, i.e.
// round half up. The accumulator's two guard bits can hold values beyond the
// 20-bit range; the reference does not say what the output does then, and this
// design saturates to the most positive or most negative code and raises sat.
//
// Purely combinational: out and sat follow acc in the same cycle.
module out_round #(
  parameter int unsigned ACC_W  = decim_pkg::ACC_W,
  parameter int unsigned FRAC_W = decim_pkg::FRAC_W,
  parameter int unsigned OUT_W  = decim_pkg::OUT_W
) (
  input  logic signed [ACC_W-1:0] acc,
  output logic signed [OUT_W-1:0] out,
  output logic                    sat
);

  localparam int unsigned INT_W = ACC_W - FRAC_W + 1;   // one spare bit for the rounding carry
  localparam logic signed [INT_W-1:0] MAX_OUT = INT_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [INT_W-1:0] MIN_OUT = -INT_W'(1 << (OUT_W - 1));

  logic signed [INT_W-1:0] rounded;

  // floor(acc / 2^FRAC_W) plus the half-LSB bit: the same as adding half an LSB
  // and truncating.
  assign rounded = INT_W'(acc >>> FRAC_W) + INT_W'({1'b0, acc[FRAC_W-1]});

  always_comb begin
    if (rounded > MAX_OUT) begin
      out = MAX_OUT[OUT_W-1:0];
      sat = 1'b1;
    end else if (rounded < MIN_OUT) begin
      out = MIN_OUT[OUT_W-1:0];
      sat = 1'b1;
    end else begin
      out = rounded[OUT_W-1:0];
      sat = 1'b0;
    end
  end

endmodule
