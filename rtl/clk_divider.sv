// clk_divider: integer rate divider producing a one-cycle strobe.
//
// The modulator runs from one board clock. Slower rates are made as clock
// enables instead of new clock domains: this block counts the cycles on
// which `en` is high and raises `tick` for one cycle on every DIV-th of
// them (on the enable cycle where the count reaches DIV-1). It is used
// twice in the modulator:
//   * as the carrier prescaler, dividing the board clock down to the rate
//     at which ROM values are read (DIV = PRESCALE);
//   * as the divide-by-x data clock, dividing the sample rate by the ROM
//     depth x so that one data bit lasts exactly one carrier period
//     (T = x / fc = Td).
// Using enables rather than a divided clock is this design's choice.
//
// Interface: clk, active-low synchronous reset rst_n, enable en, strobe
// tick (combinational from the count and en). DIV = 1 passes en through.
module clk_divider #(
  parameter int unsigned DIV = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic tick
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] count;

  assign tick = en && (count == CW'(DIV - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)    count <= '0;
    else if (tick) count <= '0;
    else if (en)   count <= count + 1'b1;
  end

endmodule
