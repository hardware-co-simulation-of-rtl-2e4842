// tb_carrier_rom: reads every entry of the 64-value carrier ROM through
// each of its four read ports, at random addresses, and compares with the
// cosine formula. Also checks the peak, trough and the two zero crossings
// (mid-scale, 127 or 128 depending on the rounding of cos near zero).
module tb_carrier_rom;
  import qpsk_ref_pkg::*;
  logic [5:0] addr [4];
  logic [7:0] data [4];
  int checks = 0, failures = 0;

  carrier_rom u_rom (.addr, .data);

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 64; k++) begin
      for (int p = 0; p < 4; p++) addr[p] = 6'((k + 17 * p) % 64);
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (int'(data[p]) != ref_sample(int'(addr[p]), 0, 64, 8)) begin
          failures++;
          $display("port %0d addr %0d: %0d expected %0d", p, addr[p], data[p],
                   ref_sample(int'(addr[p]), 0, 64, 8));
        end
      end
    end
    for (int i = 0; i < 200; i++) begin
      for (int p = 0; p < 4; p++) addr[p] = 6'($urandom_range(0, 63));
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (int'(data[p]) != ref_sample(int'(addr[p]), 0, 64, 8)) failures++;
      end
    end
    // fixed points of the stored period
    addr[0] = 6'd0; addr[1] = 6'd32; addr[2] = 6'd16; addr[3] = 6'd48;
    #1;
    checks++;
    if (data[0] != 8'd255 || data[1] != 8'd0 ||
        !(data[2] inside {8'd127, 8'd128}) || !(data[3] inside {8'd127, 8'd128})) begin
      failures++;
      $display("fixed points %0d %0d %0d %0d", data[0], data[1], data[2], data[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
