// tb_phase_shifter: for every carrier address, wave[s] must be the carrier
// advanced by the phase of symbol code s (45/135/315/225 degrees for codes
// 0/1/2/3), and successive symbols in Gray order must be 90 degrees apart.
module tb_phase_shifter;
  import qpsk_ref_pkg::*;
  logic [5:0] addr;
  logic [7:0] wave [4];
  int checks = 0, failures = 0;

  phase_shifter u_ps (.addr, .wave);

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 64; k++) begin
      addr = 6'(k);
      #1;
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (int'(wave[s]) != ref_sample(k, ref_phase_deg(2'(s)), 64, 8)) begin
          failures++;
          $display("addr %0d sym %0d: %0d expected %0d", k, s, wave[s],
                   ref_sample(k, ref_phase_deg(2'(s)), 64, 8));
        end
      end
      // 00 -> 01 -> 11 -> 10 step by a quarter period (16 samples)
      checks++;
      if (int'(wave[1]) != ref_sample((k + 16) % 64, 45, 64, 8) ||
          int'(wave[3]) != ref_sample((k + 32) % 64, 45, 64, 8) ||
          int'(wave[2]) != ref_sample((k + 48) % 64, 45, 64, 8)) begin
        failures++;
        $display("addr %0d: quarter-period spacing wrong", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
