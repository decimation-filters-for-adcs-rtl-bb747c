// sample_mem: circular data memory of the most recent DEPTH modulator bits.
//
// Each time a coefficient is fetched, the filter needs the two 1-bit samples
// that share it (tap k and tap N-1-k of the symmetric impulse response), so the
// memory has one write port and two independent read ports. A memory of DEPTH x
// 1 bit, DEPTH equal to the filter length, follows the reference design; the
// port arrangement and timing are this design's own.
//
// Interface and timing:
//   wr_en/wr_addr/wr_data : one bit written on the rising clock edge.
//   rd_en, rd_addr_a/b    : both read ports are synchronous; rd_data_a/b hold
//                           the addressed bits one cycle after rd_en is high and
//                           keep them otherwise. A read of the address being
//                           written in the same cycle returns the old bit.
// The contents are not reset; the controller ignores results until the memory
// has been filled once.
module sample_mem #(
  parameter int unsigned DEPTH  = decim_pkg::N_TAPS,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic              wr_data,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr_a,
  input  logic [ADDR_W-1:0] rd_addr_b,
  output logic              rd_data_a,
  output logic              rd_data_b
);

  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_data_a <= mem[rd_addr_a];
      rd_data_b <= mem[rd_addr_b];
    end
  end

endmodule
