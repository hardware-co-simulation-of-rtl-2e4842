// qpsk_pkg: types and constants shared by the single-ROM QPSK modulator.
//
// The modulator stores one period of a sinusoidal carrier in a ROM of
// ROM_DEPTH samples (64, the ROM size used for the design's power and area
// figures) and produces each QPSK symbol by reading that ROM from one of four
// starting points. This package holds:
//   * symbol_t - the Gray coded two-bit symbol {I, Q}, with I the first
//     (even) and Q the second (odd) serial bit;
//   * phase_offset() - the ROM address offset of each symbol's phase:
//     00 -> 45 deg, 01 -> 135 deg, 11 -> 225 deg, 10 -> 315 deg, as in the
//     symbol table of the design (one bit changes per 90 degree step);
//   * carrier_sample() - the stored sample formula
//         s[k] = round(MID + AMP * cos(2*pi*k/ROM_DEPTH))
//     an unsigned offset-binary code for a unipolar DAC. Using a cosine
//     makes the output A*cos(2*pi*fc*t + phi_i), the form of the symbol
//     table. Sample width (8 bits) and the offset-binary coding are this
//     design's choices.
package qpsk_pkg;

  localparam int unsigned ROM_DEPTH = 64;   // x, values stored in the ROM
  localparam int unsigned SAMPLE_W  = 8;    // DAC code width

  typedef enum logic [1:0] {
    SYM_00 = 2'b00,   //  45 deg
    SYM_01 = 2'b01,   // 135 deg
    SYM_11 = 2'b11,   // 225 deg
    SYM_10 = 2'b10    // 315 deg
  } symbol_t;

  // Phase of a symbol in units of 1/8 turn (45 deg): 1, 3, 5, 7.
  function automatic int unsigned phase_eighths(input logic [1:0] sym);
    case (sym)
      2'b00:   return 1;
      2'b01:   return 3;
      2'b11:   return 5;
      default: return 7;
    endcase
  endfunction

  // ROM address offset that starts the carrier at the symbol's phase.
  function automatic int unsigned phase_offset(input logic [1:0] sym,
                                               input int unsigned depth);
    return (phase_eighths(sym) * depth) / 8;
  endfunction

  // Stored carrier sample k of a ROM with `depth` entries and `width` bits.
  function automatic int unsigned carrier_sample(input int unsigned k,
                                                 input int unsigned depth,
                                                 input int unsigned width);
    real mid, amp, v;
    mid = real'((1 << width) - 1) / 2.0;
    amp = mid;
    v   = mid + amp * $cos(2.0 * 3.14159265358979323846 * real'(k) / real'(depth));
    return int'($floor(v + 0.5));
  endfunction

endpackage
