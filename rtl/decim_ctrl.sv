// decim_ctrl: sequencer of the single-accumulator FIR decimation filter.
//
// A decimation filter only computes the output samples it keeps: one output for
// every DECIM input bits, each one a sum over N_TAPS taps. With coefficient
// symmetry that is N_TAPS/2 accumulate steps per output (1203 for the 2406-tap
// reference filter, about 57 MHz at a 46.875 kHz output rate). This controller
//   * writes every input bit into the circular data memory at wr_addr,
//   * counts input bits and, on every DECIM-th one, starts an output: it clears
//     the accumulator and for k = 0 .. N_TAPS/2-1 reads coefficient h[k] together
//     with the newest-minus-k sample (port a) and the oldest-plus-k sample
//     (port b), which share that coefficient,
//   * flags the accumulator result once the last pair has been added.
// The oldest samples are read first, so bits that arrive during a computation
// only overwrite samples that have already been read.
//
// Timing: the start happens on the clock edge that writes the DECIM-th bit (edge
// 0). Reads are issued during the next N_TAPS/2 cycles, the memories answer one
// cycle later (acc_en), and result_valid rises on edge N_TAPS/2 + 1 for one
// cycle, while the accumulator holds the finished sum. busy falls on that same
// edge, so the next start may come on edge N_TAPS/2 + 2 at the earliest: DECIM
// input bits must span at least N_TAPS/2 + 2 clock cycles (1205 for the
// defaults, 18.83 clocks per input bit). A start that arrives while busy is dropped
// and sets the sticky overrun flag. result_primed tells whether the data memory
// had been filled completely when the result's computation started; results
// from a memory not yet filled since reset are not meaningful.
// The start/overrun policy, the priming rule and the read order are this
// design's own choices; the reference design gives the rate arithmetic and the symmetric
// pairing only.
module decim_ctrl #(
  parameter int unsigned N_TAPS = decim_pkg::N_TAPS,
  parameter int unsigned DECIM  = decim_pkg::DECIM,
  parameter int unsigned ADDR_W = $clog2(N_TAPS),
  parameter int unsigned CADDR_W = (N_TAPS / 2 > 1) ? $clog2(N_TAPS / 2) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  // data memory
  output logic               mem_wr_en,
  output logic [ADDR_W-1:0]  mem_wr_addr,
  output logic               rd_en,
  output logic [ADDR_W-1:0]  rd_addr_a,
  output logic [ADDR_W-1:0]  rd_addr_b,
  // coefficient ROM
  output logic [CADDR_W-1:0] coef_addr,
  // accumulator
  output logic               acc_clear,
  output logic               acc_en,
  // status
  output logic               result_valid,
  output logic               result_primed,
  output logic               busy,
  output logic               overrun
);

  localparam int unsigned HALF = N_TAPS / 2;
  localparam int unsigned PH_W = (DECIM > 1) ? $clog2(DECIM) : 1;
  localparam int unsigned FILL_W = $clog2(N_TAPS + 1);

  logic [ADDR_W-1:0]  wp;
  logic [PH_W-1:0]    phase;
  logic [FILL_W-1:0]  fill;
  logic               run;
  logic [CADDR_W-1:0] k;
  logic [ADDR_W-1:0]  addr_new, addr_old;
  logic               v1, last1, run_primed, primed_d1;
  logic               start, start_ok, filled_now;

  assign start     = in_valid && (phase == PH_W'(DECIM - 1));
  assign busy      = run || v1;
  assign start_ok  = start && !busy;
  assign filled_now = (fill == FILL_W'(N_TAPS)) ||
                      (in_valid && fill == FILL_W'(N_TAPS - 1));

  assign mem_wr_en   = in_valid;
  assign mem_wr_addr = wp;
  assign rd_en       = run;
  assign rd_addr_a   = addr_new;
  assign rd_addr_b   = addr_old;
  assign coef_addr   = k;
  assign acc_clear   = start_ok;
  assign acc_en      = v1;

  // Input side: write pointer, decimation phase, fill level.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      phase <= '0;
      fill  <= '0;
    end else if (in_valid) begin
      wp    <= (wp == ADDR_W'(N_TAPS - 1)) ? '0 : wp + 1'b1;
      phase <= (phase == PH_W'(DECIM - 1)) ? '0 : phase + 1'b1;
      if (fill != FILL_W'(N_TAPS)) fill <= fill + 1'b1;
    end
  end

  // Computation side: tap counter and the two sample addresses.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run        <= 1'b0;
      k          <= '0;
      addr_new   <= '0;
      addr_old   <= '0;
      run_primed <= 1'b0;
      overrun    <= 1'b0;
    end else begin
      if (start && busy) overrun <= 1'b1;
      if (start_ok) begin
        run        <= 1'b1;
        k          <= '0;
        addr_new   <= wp;                                           // the bit written now
        addr_old   <= (wp == ADDR_W'(N_TAPS - 1)) ? '0 : wp + 1'b1; // the oldest bit kept
        run_primed <= filled_now;
      end else if (run) begin
        if (k == CADDR_W'(HALF - 1)) run <= 1'b0;
        k        <= k + 1'b1;
        addr_new <= (addr_new == '0) ? ADDR_W'(N_TAPS - 1) : addr_new - 1'b1;
        addr_old <= (addr_old == ADDR_W'(N_TAPS - 1)) ? '0 : addr_old + 1'b1;
      end
    end
  end

  // Pipeline: memory read (1 cycle), then accumulate.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1            <= 1'b0;
      last1         <= 1'b0;
      primed_d1     <= 1'b0;
      result_valid  <= 1'b0;
      result_primed <= 1'b0;
    end else begin
      v1            <= run;
      last1         <= run && (k == CADDR_W'(HALF - 1));
      primed_d1     <= run_primed;
      result_valid  <= v1 && last1;
      result_primed <= v1 && last1 && primed_d1;
    end
  end

  initial begin
    assert (N_TAPS % 2 == 0 && N_TAPS >= 2)
      else $error("decim_ctrl: N_TAPS must be even (symmetric pairs)");
    assert (DECIM >= 1) else $error("decim_ctrl: DECIM must be at least 1");
  end

  // The accumulator is never cleared while a pair is being added.
  assert property (@(posedge clk) disable iff (!rst_n) !(acc_clear && acc_en));
  // A computation never runs past the last coefficient pair.
  assert property (@(posedge clk) disable iff (!rst_n) run |-> (k < CADDR_W'(HALF)));

endmodule
