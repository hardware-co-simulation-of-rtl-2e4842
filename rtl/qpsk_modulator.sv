// qpsk_modulator: low-power QPSK modulator built around one carrier ROM.
//
// A conventional QPSK modulator multiplies I and Q data by a cosine and a
// sine carrier (two ROMs, two multipliers) and adds the products. Since the
// sum is just one sinusoid whose starting phase depends on the symbol, this
// design stores a single carrier period in one ROM and, per symbol, reads it
// from a different starting point. Data path:
//
//   clk -> [clk_divider /PRESCALE] -> sample_en
//   sample_en -> [carrier_source] -> addr -> [phase_shifter + ROM] -> wave[4]
//   sample_en -> [clk_divider /x] -> bit_tick -> [sipo] <- din  -> sym {I,Q}
//   wave[4], sym -> [qpsk_mux] -> output register -> qpsk_out -> [dac_model]
//
// Timing. One ROM value is read per sample_en (every PRESCALE clocks), so a
// carrier period is x = DEPTH samples. The data divider makes the data clock
// equal to the carrier frequency (T = x/fc = Td): bit_tick pulses on the
// last sample of every carrier period, and `din` is sampled then. Every
// second bit completes a symbol, so a symbol lasts two carrier periods and
// the new symbol takes effect on the first sample (addr = 0) of the next
// period: each symbol starts exactly at its phase angle, 45/135/225/315 deg
// for 00/01/11/10. qpsk_out is registered, one clock after the address; the
// DAC model adds its settling delay.
//
// Taken from the original design: one 64-value ROM, the phase-shifter/multiplexer
// structure, SIPO symbol forming, the divide-by-x data clock and the Gray
// phase map. This design's own choices: 8-bit offset-binary samples, a
// cosine table, clock enables instead of derived clocks, PRESCALE = 1 by
// default, I = first (even) bit, and the registered output.
//
// Ports: clk; rst_n (synchronous, active low); din (serial data, sampled
// when bit_tick is high); bit_tick (data clock strobe, asks for the next
// bit); sym and sym_load (current symbol and its load strobe);
// carrier_addr (carrier phase index); qpsk_out (digital QPSK sample);
// dac_vout_uv (DAC model output voltage in microvolts).
module qpsk_modulator
  import qpsk_pkg::*;
#(
  parameter int unsigned DEPTH    = ROM_DEPTH,
  parameter int unsigned WIDTH    = SAMPLE_W,
  parameter int unsigned PRESCALE = 1,
  localparam int unsigned AW      = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             din,
  output logic             bit_tick,
  output symbol_t          sym,
  output logic             sym_load,
  output logic [AW-1:0]    carrier_addr,
  output logic [WIDTH-1:0] qpsk_out,
  output logic [31:0]      dac_vout_uv
);

  logic             sample_en;
  logic             period_start;
  logic             sipo_half;
  logic [WIDTH-1:0] wave [4];
  logic [WIDTH-1:0] qpsk_sel;

  // Carrier prescaler: board clock -> ROM read rate.
  clk_divider #(.DIV(PRESCALE)) u_prescale (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (1'b1),
    .tick  (sample_en)
  );

  // Carrier source: ROM read address.
  carrier_source #(.DEPTH(DEPTH)) u_carrier (
    .clk          (clk),
    .rst_n        (rst_n),
    .sample_en    (sample_en),
    .addr         (carrier_addr),
    .period_start (period_start)
  );

  // Phase shifter: one ROM, four starting points.
  phase_shifter #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_shift (
    .addr (carrier_addr),
    .wave (wave)
  );

  // Data clock: sample rate divided by x, one bit per carrier period.
  clk_divider #(.DIV(DEPTH)) u_data_div (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (sample_en),
    .tick  (bit_tick)
  );

  // Serial data -> {I, Q}.
  sipo u_sipo (
    .clk      (clk),
    .rst_n    (rst_n),
    .bit_en   (bit_tick),
    .din      (din),
    .sym      (sym),
    .sym_load (sym_load),
    .half     (sipo_half)
  );

  // Multiplexer: I and Q select the shifted carrier.
  qpsk_mux #(.WIDTH(WIDTH)) u_mux (
    .wave (wave),
    .sym  (sym),
    .qpsk (qpsk_sel)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) qpsk_out <= '0;
    else        qpsk_out <= qpsk_sel;
  end

  // Off-chip DAC.
  dac_model #(.WIDTH(WIDTH)) u_dac (
    .code    (qpsk_out),
    .vout_uv (dac_vout_uv)
  );

  // The data divider and the address counter count the same enables from
  // reset, so every data bit is taken on the last sample of a period and
  // every symbol begins at address 0.
  a_bit_at_period_end: assert property (@(posedge clk) disable iff (!rst_n)
    bit_tick |-> (sample_en && carrier_addr == AW'(DEPTH - 1)));

  // A symbol is loaded on the second bit of each pair only.
  a_load_on_odd_bit: assert property (@(posedge clk) disable iff (!rst_n)
    sym_load |-> (bit_tick && sipo_half));

  // A new symbol starts on the first sample of a carrier period.
  a_symbol_at_period_start: assert property (@(posedge clk) disable iff (!rst_n)
    sym_load |=> period_start);

endmodule
