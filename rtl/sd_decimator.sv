// sd_decimator: single-stage linear-phase FIR decimation filter for a 1-bit
// sigma-delta modulator.
//
// The modulator bit stream (in_bit, 1 = +1, 0 = -1, one bit per in_valid) is
// low-pass filtered by an N_TAPS-tap FIR and decimated by DECIM: with the
// defaults, 2406 taps and 64x, a 3 MHz stream becomes 46.875 kHz 20-bit words.
// Because the data are one bit wide there is no multiplier, and because the
// impulse response is symmetric the two samples that share a coefficient are
// added first, so one accumulator performs N_TAPS/2 add/subtract/hold steps per
// output. Parts:
//   sample_mem : N_TAPS x 1b circular data memory, two read ports
//   coef_rom   : N_TAPS/2 x 23b coefficients (15.8), sum of all taps = 2^20
//   sym_mac    : pre-adder and 30b (22.8) accumulator
//   out_round  : round half up to 20 bits, saturate beyond the 20-bit range
//   decim_ctrl : input counting, address sequencing, overrun detection
//
// Interface and timing: one clock (clk), asynchronous active-low reset. in_valid
// may be high at most once per clock; DECIM consecutive input bits must span at
// least N_TAPS/2 + 2 cycles (1205 cycles per 64 bits by default, so a clock of at
// least 18.83x the input bit rate, 56.5 MHz for a 3 MHz modulator). out_valid
// rises for one cycle on the (N_TAPS/2 + 2)-th clock edge after the edge that
// takes every DECIM-th input bit, once the data memory has been filled since
// reset (N_TAPS bits); out_data is then the
// rounded filter output over the newest N_TAPS bits including that one, and
// out_sat tells whether it was clipped. overrun is sticky and reports a dropped
// output. The datapath follows the reference design; the handshake, reset, saturation
// and overrun rules are this design's own.
module sd_decimator #(
  parameter int unsigned N_TAPS    = decim_pkg::N_TAPS,
  parameter int unsigned DECIM     = decim_pkg::DECIM,
  parameter int unsigned COEF_W    = decim_pkg::COEF_W,
  parameter int unsigned FRAC_W    = decim_pkg::FRAC_W,
  parameter int unsigned ACC_W     = decim_pkg::ACC_W,
  parameter int unsigned OUT_W     = decim_pkg::OUT_W,
  parameter string       COEF_FILE = "rtl/filter2_coef.hex"
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_bit,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data,
  output logic                    out_sat,
  output logic                    busy,
  output logic                    overrun
);

  localparam int unsigned ADDR_W  = $clog2(N_TAPS);
  localparam int unsigned CADDR_W = (N_TAPS / 2 > 1) ? $clog2(N_TAPS / 2) : 1;

  logic               mem_wr_en, rd_en, acc_clear, acc_en;
  logic [ADDR_W-1:0]  mem_wr_addr, rd_addr_a, rd_addr_b;
  logic [CADDR_W-1:0] coef_addr;
  logic               result_valid, result_primed;
  logic               smp_a, smp_b;
  logic signed [COEF_W-1:0] coef;
  logic signed [ACC_W-1:0]  acc;
  logic signed [OUT_W-1:0]  rounded;
  logic                     sat;

  decim_ctrl #(.N_TAPS(N_TAPS), .DECIM(DECIM), .ADDR_W(ADDR_W), .CADDR_W(CADDR_W)) u_ctrl (
    .clk, .rst_n, .in_valid,
    .mem_wr_en, .mem_wr_addr, .rd_en, .rd_addr_a, .rd_addr_b,
    .coef_addr, .acc_clear, .acc_en,
    .result_valid, .result_primed, .busy, .overrun
  );

  sample_mem #(.DEPTH(N_TAPS), .ADDR_W(ADDR_W)) u_mem (
    .clk,
    .wr_en(mem_wr_en), .wr_addr(mem_wr_addr), .wr_data(in_bit),
    .rd_en, .rd_addr_a, .rd_addr_b,
    .rd_data_a(smp_a), .rd_data_b(smp_b)
  );

  coef_rom #(.DEPTH(N_TAPS / 2), .COEF_W(COEF_W), .ADDR_W(CADDR_W), .INIT_FILE(COEF_FILE)) u_rom (
    .clk, .rd_en, .rd_addr(coef_addr), .rd_data(coef)
  );

  sym_mac #(.COEF_W(COEF_W), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n, .clear(acc_clear), .en(acc_en),
    .smp_a, .smp_b, .coef, .acc
  );

  out_round #(.ACC_W(ACC_W), .FRAC_W(FRAC_W), .OUT_W(OUT_W)) u_round (
    .acc, .out(rounded), .sat
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sat   <= 1'b0;
    end else begin
      out_valid <= result_valid && result_primed;
      if (result_valid && result_primed) begin
        out_data <= rounded;
        out_sat  <= sat;
      end
    end
  end

endmodule
