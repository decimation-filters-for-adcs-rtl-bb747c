// sym_mac: pre-adder and add/subtract/hold accumulator of the decimation filter.
//
// With 1-bit input data no multiplier is needed. The two samples that share a
// coefficient are added first; as each is +1 or -1 the sum is +2, 0 or -2, so
// each cycle the accumulator adds twice the coefficient, subtracts it, or does
// nothing. This halves the accumulate rate of a plain FIR and is the scheme of
// the reference design. The accumulator is ACC_W = 30 bits (22 integer bits,
// 8 fraction bits): bits 20 and 21 sit above the 20-bit output and keep every
// partial sum in range, because the sum of absolute coefficient values is below
// 2^21.
//
// Interface and timing: on a rising edge with clear high the accumulator is
// loaded with 0 (clear wins over en); with en high it takes one pair (smp_a,
// smp_b: 1 = +1, 0 = -1) and one coefficient (COEF_W bits, same fraction bits
// as the accumulator). acc is the registered sum. Wrap-around on overflow is
// not guarded: the coefficient table must keep sum(|h|) below 2^(ACC_W-FRAC_W-1).
module sym_mac #(
  parameter int unsigned COEF_W = decim_pkg::COEF_W,
  parameter int unsigned ACC_W  = decim_pkg::ACC_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     en,
  input  logic                     smp_a,
  input  logic                     smp_b,
  input  logic signed [COEF_W-1:0] coef,
  output logic signed [ACC_W-1:0]  acc
);
  import decim_pkg::*;

  logic signed [ACC_W-1:0] twice_coef;
  logic signed [ACC_W-1:0] acc_next;

  // 2*coef, sign-extended to the accumulator width (COEF_W+1 <= ACC_W).
  assign twice_coef = ACC_W'(coef) <<< 1;

  always_comb begin
    unique case (pair_sum(smp_a, smp_b))
      PAIR_PLUS:  acc_next = acc + twice_coef;
      PAIR_MINUS: acc_next = acc - twice_coef;
      default:    acc_next = acc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      acc <= '0;
    else if (clear)  acc <= '0;
    else if (en)     acc <= acc_next;
  end

  initial begin
    assert (COEF_W + 1 <= ACC_W) else $error("sym_mac: ACC_W must exceed COEF_W");
  end

endmodule
