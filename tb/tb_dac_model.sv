// tb_dac_model: every 8-bit code must give VREF*code/255 microvolts after
// the settling delay, and the output must still hold the old value before
// the delay has passed.
module tb_dac_model;
  import qpsk_ref_pkg::*;
  logic [7:0]  code;
  logic [31:0] vout_uv;
  int checks = 0, failures = 0;

  dac_model #(.T_SETTLE(4)) u_dac (.code, .vout_uv);

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code = 8'd0;
    #10;
    for (int c = 1; c < 256; c++) begin
      code = 8'(c);
      #2;
      checks++;
      if (longint'(vout_uv) != ref_dac_uv(c - 1, 8, 3_300_000)) begin
        failures++;
        $display("code %0d: output changed before settling", c);
      end
      #4;
      checks++;
      if (longint'(vout_uv) != ref_dac_uv(c, 8, 3_300_000)) begin
        failures++;
        $display("code %0d: %0d uV expected %0d", c, vout_uv, ref_dac_uv(c, 8, 3_300_000));
      end
    end
    checks++;
    if (vout_uv != 32'd3_300_000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
