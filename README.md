# Single-ROM QPSK modulator

A textbook QPSK modulator splits the data into an in-phase bit I and a
quadrature bit Q, multiplies them by a cosine and a sine carrier and adds the
two products. That takes two carrier tables, two multipliers and an adder. But
for each of the four symbols the sum is just one sinusoid with a fixed
starting phase:

    s(t) = A cos(2 pi fc t + phi),   phi = 45, 135, 225 or 315 degrees

So this modulator stores **one** period of the carrier in **one** ROM and
makes each symbol by reading that ROM from a different starting address. No
multiplier, no adder and no second table are needed. The output is a stream of
8-bit samples for an external DAC.

## Symbol map

Symbols are Gray coded, so neighbouring constellation points differ in one
bit and each step round the circle is 90 degrees:

| symbol {I,Q} | phase | ROM offset (64-entry ROM) |
|---|---|---|
| 00 | 45°  | 8  |
| 01 | 135° | 24 |
| 11 | 225° | 40 |
| 10 | 315° | 56 |

The offset is `phase / 360 * x`, where x is the number of stored samples. I
is the first (even) serial bit of a pair and Q the second (odd) one. So
the serial stream `0 1` gives symbol 01 and 135°.

## Data path

    clk ─► clk_divider(/PRESCALE) ─► sample_en
                                        │
           ┌────────────────────────────┼───────────────────────┐
           ▼                            ▼                       │
    carrier_source (addr 0..x-1)   clk_divider(/x) ─► bit_tick  │
           │                            │                       │
           ▼                            ▼                       │
    phase_shifter: one ROM,        sipo ◄── din                 │
    read at addr+8, +24, +56, +40       │ sym = {I,Q}           │
           │ wave[0..3]                 │                       │
           └──────────► qpsk_mux ◄──────┘                       │
                           │                                    │
                       output register ─► qpsk_out ─► dac_model ─► dac_vout_uv

| file | role |
|---|---|
| `rtl/qpsk_pkg.sv` | ROM depth and sample width, `symbol_t`, the phase-to-offset map, the carrier sample formula |
| `rtl/clk_divider.sv` | enable-rate divider with a one-cycle `tick`. It is used twice: as the carrier prescaler and as the divide-by-x data clock |
| `rtl/carrier_source.sv` | ROM address counter. It advances one sample per `sample_en` and wraps every x samples |
| `rtl/carrier_rom.sv` | the single carrier table: x samples, four asynchronous read ports |
| `rtl/phase_shifter.sv` | adds the four phase offsets to the address and reads the ROM, giving four shifted carriers `wave[s]`, indexed by symbol code |
| `rtl/sipo.sv` | serial-in parallel-out register. It pairs serial bits into symbols `{I,Q}` |
| `rtl/qpsk_mux.sv` | 4:1 multiplexer. I and Q select the shifted carrier |
| `rtl/dac_model.sv` | behavioural model of the off-chip DAC (not synthesizable) |
| `rtl/qpsk_modulator.sv` | top level |

## Timing: carrier, bits and symbols

This is the part that needs care.

* **Carrier.** The ROM is read once per `sample_en`, which comes every
  PRESCALE clocks. One carrier period is x = 64 samples:
  `fc = f_clk / (PRESCALE * 64)`. The prescaler exists to bring the carrier
  down to a frequency that can be watched on an oscilloscope. Its default is 1.
* **Data clock.** A second divider divides the sample rate by x. So the data
  bit period equals the carrier period (`T = x / f_sample = Td`). `bit_tick`
  is high on the last sample of each carrier period, when `carrier_addr =
  x-1`. The serial input `din` is sampled on that cycle. A source should
  present the next bit after each `bit_tick`.
* **Symbols.** The second bit of each pair loads `sym` (`sym_load` pulses).
  This happens on the last sample of a period. The first sample of the next
  period, `addr = 0`, is therefore already read with the new symbol. Each
  symbol lasts two carrier periods and begins exactly at its phase angle.
  The output jumps between phases only at a period boundary. Pairing starts
  with the first bit after reset. For the first two periods the symbol is 00.
* **Latency.** `qpsk_out` is registered. It shows the sample of the current
  address and symbol one clock later. The bits of periods 2j and 2j+1 are
  transmitted in periods 2j+2 and 2j+3. The DAC model adds `T_SETTLE` time
  units.

Assertions in the top check these alignments:

* every `bit_tick` falls on address x-1;
* `sym_load` comes only on the odd bit;
* every new symbol starts at address 0.

## Sample format

The table holds `s[k] = round(127.5 + 127.5 * cos(2*pi*k/64))`. These are
8-bit offset-binary values, 0 to 255, with mid-scale between 127 and 128. The
table is computed during elaboration by `qpsk_pkg::carrier_sample`, so no
data file is needed. Changing `DEPTH` or `WIDTH` regenerates it. A cosine is
stored so that the output is literally `cos(2 pi fc t + phi)`. A sine table
would rotate all four phases by the same 90 degrees.

`dac_model` is an ideal unipolar converter: `vout = 3.3 V * code / 255`. It
reports the voltage as an integer number of microvolts.

## Parameters (top level)

| parameter | default | meaning |
|---|---|---|
| `DEPTH` | 64 | samples per carrier period, x. Must be a power of two |
| `WIDTH` | 8 | sample and DAC width |
| `PRESCALE` | 1 | board clocks per ROM sample |

`DEPTH = 64` is the ROM size of the original design. `WIDTH` and `PRESCALE`
are this implementation's choices. The original design gives no sample
width and no divider ratio for the carrier.

## Departures and choices to be aware of

* **Phase shifter.** The original describes the phase shifter as the ROM
  itself, read from four starting points. It also describes it as a
  demultiplexer feeding the multiplexer. Here it is one table with four read
  ports. Synthesis shows one 64 × 8 array (2048 bits) with four read
  ports. An equivalent and smaller variant would first select the offset
  with I/Q and then do a single read. That variant merges the phase shifter
  and the multiplexer, so the structure was kept as described.
* **Rate derivation.** Divided rates are clock enables, not new clock domains.
  The carrier prescaler is a counter. The original mentions a shift register
  for this purpose.
* **Bit-to-carrier ratio.** One serial bit per carrier period, and so two
  carrier periods per symbol. This is one reading of `T = Td`. If a symbol
  should last one period instead, set the data divider in the top to
  `DEPTH/2`. The built-in alignment assertions would then need adjusting.
* **Not built.** The conventional two-table (sine/cosine multiply-and-add)
  modulator is not built. It serves only as the point of comparison. The
  output is the multiplexer output directly: no I/Q summing stage exists.
* **Reset.** Reset is synchronous and active low on every register. After
  reset the address is 0, the symbol is 00 and the output is 0.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog. Expected values come
from `tb/qpsk_ref_pkg.sv`, which is written from the phase table and the
cosine formula, not from the RTL.

* `tb_qpsk_modulator` is the end-to-end test at the default size: 64-entry ROM,
  8 bits, PRESCALE 1. It sends 80 symbols, about 10,400 clocks. The first 17
  contain every ordered symbol pair, including the 00 → 01 step; the rest are
  random. It predicts every output sample, the address, `bit_tick`, `sym`
  and the DAC voltage in closed form from the clock count. It also counts
  each mechanism:
  * bit ticks;
  * symbol loads;
  * phase changes;
  * carrier wraps;
  * each symbol;
  * each of the 16 transitions.

  The test fails if any count is zero.
* `tb_qpsk_prescale` runs the same test with PRESCALE = 3.
* The unit tests cover:
  * the divider at ratios 64 and 5 with a random enable;
  * all ROM entries on all four ports;
  * the address counter with a random enable;
  * all four shifted carriers at every address;
  * the SIPO with random bits and strobes;
  * the multiplexer;
  * the DAC transfer function and its settling delay.

Each testbench was also run against a copy of its module with one deliberate
bug, such as an off-by-one divider, swapped I/Q or a binary instead of Gray
phase map. Every one of those runs reported failures.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/qpsk_pkg.sv tb/qpsk_ref_pkg.sv tb/tb_qpsk_modulator.sv \
        --top-module tb_qpsk_modulator -o sim
    ./obj_dir/sim

Replace the testbench name to run any other test. The default-size test
finishes in well under a second.
