// carrier_source: steps through the carrier ROM, one value per sample clock.
//
// The carrier is produced by reading the stored period one value per
// sample-clock enable, so the carrier frequency is the sample rate divided
// by the ROM depth x. This block is the read address counter: `addr`
// counts 0 .. DEPTH-1 and wraps, advancing on each cycle with sample_en.
// `period_start` is high while addr is 0, marking the first sample of a
// carrier period. The phase shifter turns this address into four shifted
// read addresses of the one ROM. Reading one stored value per sample clock
// follows the original design; the enable-driven counter is this design's.
//
// Interface: clk, synchronous active-low rst_n (addr -> 0), sample_en.
// DEPTH must be a power of two so the counter wraps naturally.
module carrier_source
  import qpsk_pkg::*;
#(
  parameter int unsigned DEPTH = ROM_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sample_en,
  output logic [AW-1:0] addr,
  output logic          period_start
);

  always_ff @(posedge clk) begin
    if (!rst_n)         addr <= '0;
    else if (sample_en) addr <= addr + 1'b1;
  end

  assign period_start = (addr == '0);

  initial assert (DEPTH == (1 << AW))
    else $error("carrier_source: DEPTH must be a power of two");

endmodule
