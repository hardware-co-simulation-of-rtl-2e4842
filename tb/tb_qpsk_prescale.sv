// tb_qpsk_prescale: end-to-end test of the modulator with the carrier
// prescaler set to 3, so that each ROM value is held for three clocks and
// the carrier and data clock run at a third of the default rate (the
// prescaler is how the carrier frequency is lowered for an oscilloscope).
// Otherwise identical to the default-size end-to-end test.
//
// A serial bit stream is presented one bit per carrier period (din follows
// the period index; the modulator samples it on bit_tick). The expected
// output is worked out in closed form from the clock count c after reset:
// sample index n = c / P, carrier address n mod 64, period p = n / 64; the
// symbol of period p is the bit pair of periods 2j-2, 2j-1 with j = p / 2
// (00 for the first two periods); qpsk_out one clock later must equal the
// reference carrier sample shifted by that symbol's phase, and the DAC
// model must show the matching voltage. The first 17 symbols form a
// sequence that contains all 16 symbol-to-symbol transitions; the rest are
// random. Mechanisms counted (each must occur): bit ticks, symbol loads,
// phase changes, each of the four symbols, each of the 16 transitions
// (including the 00 -> 01 step), and carrier period wraps.
module tb_qpsk_prescale;
  import qpsk_pkg::*;
  import qpsk_ref_pkg::*;

  localparam int P     = 3;    // carrier prescaler under test
  localparam int X     = 64;   // ROM depth
  localparam int NSYM  = 80;
  localparam int NPER  = 2 * NSYM + 2;
  localparam int NCYC  = NPER * X * P;

  logic        clk = 1'b0, rst_n = 1'b0, din = 1'b0;
  logic        bit_tick, sym_load;
  symbol_t     sym;
  logic [5:0]  carrier_addr;
  logic [7:0]  qpsk_out;
  logic [31:0] dac_vout_uv;

  int checks = 0, failures = 0;
  int n_tick = 0, n_load = 0, n_change = 0, n_wrap = 0;
  int sym_seen [4];
  int trans_seen [4][4];
  logic [1:0] syms [NSYM];
  logic       bits [NPER];

  always #5 clk = ~clk;

  qpsk_modulator #(.PRESCALE(P)) u_dut (
    .clk, .rst_n, .din, .bit_tick, .sym, .sym_load, .carrier_addr,
    .qpsk_out, .dac_vout_uv
  );

  function automatic logic [1:0] period_sym(input int p);
    return (p < 2) ? 2'b00 : syms[p / 2 - 1];
  endfunction

  function automatic int expected_out(input int c);
    int n;
    n = c / P;
    return ref_sample(n % X, ref_phase_deg(period_sym(n / X)), X, 8);
  endfunction

  initial begin
    #(20 * NCYC + 10_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // de Bruijn order over the four symbols: every ordered pair once
    automatic int db [17] = '{0, 0, 1, 0, 2, 0, 3, 1, 1, 2, 1, 3, 2, 2, 3, 3, 0};
    for (int j = 0; j < NSYM; j++)
      syms[j] = (j < 17) ? 2'(db[j]) : 2'($urandom_range(0, 3));
    for (int p = 0; p < NPER; p++) bits[p] = 1'b0;
    for (int j = 0; j < NSYM; j++) begin
      bits[2 * j]     = syms[j][1];   // even bit -> I
      bits[2 * j + 1] = syms[j][0];   // odd bit  -> Q
    end

    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      automatic int n, p;
      n   = c / P;
      p   = n / X;
      din = bits[p];
      #1;
      // combinational outputs during cycle c
      checks++;
      if (int'(carrier_addr) != n % X) begin
        failures++;
        $display("c=%0d carrier_addr %0d expected %0d", c, carrier_addr, n % X);
      end
      checks++;
      if (bit_tick !== (c == P * X * (p + 1) - 1)) begin
        failures++;
        $display("c=%0d bit_tick %0b", c, bit_tick);
      end
      checks++;
      if (sym !== symbol_t'(period_sym(p))) begin
        failures++;
        $display("c=%0d sym %b expected %b", c, sym, period_sym(p));
      end
      if (bit_tick) n_tick++;
      if (sym_load) begin
        n_load++;
        if (p >= 1 && period_sym(p + 1) != period_sym(p)) n_change++;
        trans_seen[period_sym(p)][period_sym(p + 1)]++;
        sym_seen[period_sym(p + 1)]++;
      end
      if (c > 0 && carrier_addr == '0 && c % P == 0) n_wrap++;
      @(posedge clk);
      #1;
      checks++;
      if (int'(qpsk_out) != expected_out(c)) begin
        failures++;
        $display("c=%0d qpsk_out %0d expected %0d (sym %b)", c, qpsk_out,
                 expected_out(c), period_sym(p));
      end
      @(negedge clk);
      // DAC model has settled by now (delay 1 < half a clock period)
      checks++;
      if (longint'(dac_vout_uv) != ref_dac_uv(expected_out(c), 8, 3_300_000)) begin
        failures++;
        $display("c=%0d dac %0d uV", c, dac_vout_uv);
      end
    end

    // every mechanism must have been exercised
    checks++;
    if (n_tick != NPER || n_load != NPER / 2) begin
      failures++;
      $display("bit ticks %0d (exp %0d), symbol loads %0d (exp %0d)", n_tick, NPER,
               n_load, NPER / 2);
    end
    checks++;
    if (n_change == 0 || n_wrap == 0) begin
      failures++;
      $display("phase changes %0d, carrier wraps %0d", n_change, n_wrap);
    end
    for (int a = 0; a < 4; a++) begin
      checks++;
      if (sym_seen[a] == 0) begin
        failures++;
        $display("symbol %0d never sent", a);
      end
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (trans_seen[a][b] == 0) begin
          failures++;
          $display("transition %0d -> %0d never seen", a, b);
        end
      end
    end
    $display("bit ticks %0d, symbol loads %0d, phase changes %0d, carrier wraps %0d",
             n_tick, n_load, n_change, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
