// tb_qpsk_mux: with random data on the four inputs, the output must be the
// input chosen by the Gray symbol on the select lines.
module tb_qpsk_mux;
  import qpsk_pkg::*;
  logic [7:0] wave [4];
  symbol_t    sym;
  logic [7:0] qpsk;
  int checks = 0, failures = 0;

  qpsk_mux u_mux (.wave, .sym, .qpsk);

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      for (int p = 0; p < 4; p++) wave[p] = 8'($urandom_range(0, 255));
      sym = symbol_t'(2'(i % 4));
      #1;
      checks++;
      if (qpsk !== wave[i % 4]) begin
        failures++;
        $display("sym %b: out %0d expected %0d", sym, qpsk, wave[i % 4]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
