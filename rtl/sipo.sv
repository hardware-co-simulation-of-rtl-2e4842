// sipo: serial-in parallel-out register splitting data into I and Q.
//
// The modulator takes one serial data stream and forms two-bit symbols
// from it. On each cycle with bit_en the register samples `din`. The first
// bit of a pair (even bit) is held; when the second (odd) bit arrives both
// are loaded together into the parallel output sym = {I, Q} = {even, odd},
// and sym_load pulses for that cycle. sym therefore changes only once per
// two bits and holds its value for the whole symbol. The pairing starts with
// the first bit after reset; sym resets to 2'b00. Splitting one serial
// stream into I and Q follows the original design; taking the even bit as
// I and loading both bits at once are this design's choices.
//
// Interface: clk, synchronous active-low rst_n, bit_en (data clock strobe),
// din; outputs sym (symbol_t, registered), sym_load, and half (high while
// the even bit of a pair is held).
module sipo
  import qpsk_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    bit_en,
  input  logic    din,
  output symbol_t sym,
  output logic    sym_load,
  output logic    half
);

  logic even_bit;

  assign sym_load = bit_en && half;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      even_bit <= 1'b0;
      half     <= 1'b0;
      sym      <= SYM_00;
    end else if (bit_en) begin
      if (!half) begin
        even_bit <= din;
        half     <= 1'b1;
      end else begin
        sym      <= symbol_t'({even_bit, din});
        half     <= 1'b0;
      end
    end
  end

endmodule
