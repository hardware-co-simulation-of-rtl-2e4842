// qpsk_ref_pkg: reference model used by the QPSK testbenches.
//
// Written from the modulator's specification rather than from its RTL:
//   * symbol phases in degrees from the Gray symbol table
//     (00 -> 45, 01 -> 135, 11 -> 225, 10 -> 315);
//   * the carrier sample at index n of a period of `depth` samples, shifted
//     by `deg` degrees: round((2^w-1)/2 * (1 + cos(2*pi*m/depth))) with
//     m = (n + deg*depth/360) mod depth;
//   * the ideal DAC voltage in microvolts.
package qpsk_ref_pkg;

  function automatic int ref_phase_deg(input logic [1:0] sym);
    case (sym)
      2'b00: return 45;
      2'b01: return 135;
      2'b11: return 225;
      2'b10: return 315;
      default: return 0;
    endcase
  endfunction

  function automatic int ref_sample(input int n, input int deg, input int depth,
                                    input int width);
    int  m;
    real half;
    m    = (n + (deg * depth) / 360) % depth;
    half = real'((1 << width) - 1) / 2.0;
    return int'($floor(half + half * $cos(2.0 * 3.14159265358979323846 *
                                          real'(m) / real'(depth)) + 0.5));
  endfunction

  function automatic longint ref_dac_uv(input int code, input int width,
                                        input longint vref_uv);
    return (vref_uv * code) / ((longint'(1) << width) - 1);
  endfunction

endpackage
