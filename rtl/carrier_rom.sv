// carrier_rom: the single ROM holding one period of the sinusoidal carrier.
//
// DEPTH samples of s[k] = round(MID + AMP*cos(2*pi*k/DEPTH)) with
// MID = AMP = (2^WIDTH - 1)/2 (see qpsk_pkg::carrier_sample) are computed
// when the design is elaborated, so no data file is needed. The table is
// read asynchronously through NREAD independent read ports; the phase
// shifter uses four of them to read the same stored period from four
// starting points at once. There is one storage array whatever NREAD is.
// The 64-entry depth follows the design; the width, the cosine table and
// the asynchronous read are this design's choices.
//
// Interface: addr[i] in, data[i] out, combinational, for i < NREAD.
module carrier_rom
  import qpsk_pkg::*;
#(
  parameter int unsigned DEPTH = ROM_DEPTH,
  parameter int unsigned WIDTH = SAMPLE_W,
  parameter int unsigned NREAD = 4,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic [AW-1:0]    addr [NREAD],
  output logic [WIDTH-1:0] data [NREAD]
);

  logic [WIDTH-1:0] rom [DEPTH];

  for (genvar k = 0; k < DEPTH; k++) begin : g_table
    assign rom[k] = WIDTH'(carrier_sample(k, DEPTH, WIDTH));
  end

  for (genvar p = 0; p < NREAD; p++) begin : g_read
    assign data[p] = rom[addr[p]];
  end

endmodule
