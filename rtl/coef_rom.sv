// coef_rom: read-only store of the unique half of a symmetric FIR impulse
// response.
//
// A linear-phase filter of even length N has h[k] = h[N-1-k], so only N/2
// coefficients are stored (1203 for the 2406-tap reference filter). Each word
// is a COEF_W-bit two's-complement number with FRAC_W fraction bits (15.8 by
// default), read synchronously: rd_data holds h[rd_addr] one cycle after rd_en.
//
// The contents are loaded from INIT_FILE, one hex word per line, h[0] first,
// with $readmemh; the synthesis tool must honour $readmemh initialisation of a
// ROM (not every front end does, and one that ignores it leaves the ROM empty).
// The default table is a near-equiripple low-pass with the reference filter's
// specification: 2406 taps at fs = 3 MHz, passband 0-20 kHz, stopband 27 kHz to
// 1.5 MHz, designed by minimax (iteratively reweighted least squares, stopband
// weight 4000), scaled so the N coefficients sum to 2^20 (120.4 dB dc gain),
// then rounded to the nearest 1/256 (coef = round(256*coef)/256). Passband
// ripple is +-0.0104 dB and the stopband is 126.7 dB below dc. Its largest
// coefficient is +15773.11 and its smallest -3344.02; the sum of absolute values
// is 2.042e6, below the 2^21 limit of the accumulator. The reference's own
// coefficient values are not published, so this table is a stand-in with the
// same specification, not a copy.
module coef_rom #(
  parameter int unsigned DEPTH     = decim_pkg::N_TAPS / 2,
  parameter int unsigned COEF_W    = decim_pkg::COEF_W,
  parameter int unsigned ADDR_W    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter string       INIT_FILE = "rtl/filter2_coef.hex"
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [ADDR_W-1:0]        rd_addr,
  output logic signed [COEF_W-1:0] rd_data
);

  logic [COEF_W-1:0] rom [DEPTH];

  initial $readmemh(INIT_FILE, rom);

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= signed'(rom[rd_addr]);
  end

endmodule
