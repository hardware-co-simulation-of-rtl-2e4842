// phase_shifter: four phase-shifted copies of the carrier from one ROM.
//
// Instead of multiplying data by sine and cosine carriers, each QPSK symbol
// is the same sinusoid started at a different phase. This block holds the
// one carrier ROM and reads it at the carrier address plus a fixed offset
// per symbol: offset = phase/360 * DEPTH, i.e. 8, 24, 40 and 56 for 45,
// 135, 225 and 315 degrees with a 64-entry ROM. wave[s] is the carrier
// shifted for symbol code s (wave[2'b00] = 45 deg, wave[2'b01] = 135 deg,
// wave[2'b11] = 225 deg, wave[2'b10] = 315 deg). The multiplexer then
// picks one of the four with the symbol bits I and Q.
//
// Interface: addr in (carrier phase index), wave[4] out, combinational.
// The offsets wrap modulo DEPTH (a power of two).
module phase_shifter
  import qpsk_pkg::*;
#(
  parameter int unsigned DEPTH = ROM_DEPTH,
  parameter int unsigned WIDTH = SAMPLE_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic [AW-1:0]    addr,
  output logic [WIDTH-1:0] wave [4]
);

  logic [AW-1:0] rd_addr [4];

  for (genvar s = 0; s < 4; s++) begin : g_shift
    localparam logic [AW-1:0] OFFSET = AW'(phase_offset(2'(s), DEPTH));
    assign rd_addr[s] = addr + OFFSET;
  end

  carrier_rom #(
    .DEPTH (DEPTH),
    .WIDTH (WIDTH),
    .NREAD (4)
  ) u_rom (
    .addr (rd_addr),
    .data (wave)
  );

endmodule
