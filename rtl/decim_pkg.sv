// decim_pkg: constants and types shared by the sigma-delta decimation filter.
//
// The filter is a single-stage, linear-phase FIR low-pass that takes the 1-bit
// output of a sigma-delta modulator (3 MHz in the reference audio application)
// and delivers one 20-bit word for every 64 input bits (46.875 kHz). The default
// numbers are those of the reference design ("Filter #2"): 2406 taps, 23-bit
// coefficients with 8 fraction bits (15.8 two's complement), a 30-bit
// accumulator (22.8: two guard bits above the 20-bit output for overload
// protection) and a 20-bit rounded output.
//
// Sample encoding (a choice of this design): a stored bit 1 means +1, 0 means -1.
package decim_pkg;

  parameter int unsigned N_TAPS  = 2406;  // FIR length (Filter #2)
  parameter int unsigned DECIM   = 64;    // decimation ratio, 3 MHz -> 46.875 kHz
  parameter int unsigned COEF_W  = 23;    // coefficient width, 15 integer + 8 fraction bits
  parameter int unsigned FRAC_W  = 8;     // fraction bits of coefficients and accumulator
  parameter int unsigned ACC_W   = 30;    // accumulator width, 22 integer + 8 fraction bits
  parameter int unsigned OUT_W   = 20;    // ADC output word

  // Result of pre-adding the two 1-bit samples that share one coefficient.
  typedef enum logic [1:0] {
    PAIR_ZERO = 2'b00,   // samples differ: contribution 0
    PAIR_PLUS = 2'b01,   // both +1: add 2*coef
    PAIR_MINUS = 2'b10   // both -1: subtract 2*coef
  } pair_sum_e;

  // Pre-adder: map two samples (1 = +1, 0 = -1) to the accumulator action.
  function automatic pair_sum_e pair_sum(input logic a, input logic b);
    if (a && b)        return PAIR_PLUS;
    else if (!a && !b) return PAIR_MINUS;
    else               return PAIR_ZERO;
  endfunction

endpackage
