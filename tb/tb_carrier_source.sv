// tb_carrier_source: the ROM address must count enabled cycles modulo 64,
// hold when sample_en is low, and flag address 0 with period_start.
module tb_carrier_source;
  logic       clk = 1'b0, rst_n = 1'b0, sample_en = 1'b0;
  logic [5:0] addr;
  logic       period_start;
  int checks = 0, failures = 0, n_en = 0, n_wrap = 0;

  always #5 clk = ~clk;

  carrier_source u_src (.clk, .rst_n, .sample_en, .addr, .period_start);

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      sample_en = 1'($urandom_range(0, 2) != 0);
      #1;
      checks++;
      if (int'(addr) != n_en % 64 || period_start != (n_en % 64 == 0)) begin
        failures++;
        $display("c=%0d addr %0d expected %0d", c, addr, n_en % 64);
      end
      if (sample_en) begin
        n_en++;
        if (n_en % 64 == 0) n_wrap++;
      end
      @(negedge clk);
    end
    checks++;
    if (n_wrap < 2) begin
      failures++;
      $display("address never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
