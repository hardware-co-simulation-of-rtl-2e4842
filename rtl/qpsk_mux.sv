// qpsk_mux: selects the phase-shifted carrier of the current symbol.
//
// A 4:1 multiplexer whose select lines are the symbol bits I and Q. Its
// output is the QPSK signal: the carrier at the phase of the Gray mapping
// 00 -> 45 deg, 01 -> 135 deg, 11 -> 225 deg, 10 -> 315 deg, given that
// wave[s] is the carrier shifted for symbol code s (see phase_shifter).
// The multiplexer itself is part of the original structure; indexing the
// inputs by binary code is this design's choice.
//
// Interface: wave[4] and sym in, qpsk out; purely combinational.
module qpsk_mux
  import qpsk_pkg::*;
#(
  parameter int unsigned WIDTH = SAMPLE_W
) (
  input  logic [WIDTH-1:0] wave [4],
  input  symbol_t          sym,
  output logic [WIDTH-1:0] qpsk
);

  always_comb begin
    unique case (sym)
      SYM_00:  qpsk = wave[0];
      SYM_01:  qpsk = wave[1];
      SYM_10:  qpsk = wave[2];
      SYM_11:  qpsk = wave[3];
      default: qpsk = wave[0];
    endcase
  end

endmodule
