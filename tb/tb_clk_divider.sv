// tb_clk_divider: checks the rate divider at its default ratio (64) and at
// a ratio of 5, with a randomly gated enable. A tick must come on exactly
// every DIV-th enabled cycle and never on a disabled cycle.
module tb_clk_divider;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic tick64, tick5;
  int   checks = 0, failures = 0;
  int   n_en = 0, n_tick64 = 0, n_tick5 = 0;

  always #5 clk = ~clk;

  clk_divider              u_d64 (.clk, .rst_n, .en, .tick(tick64));
  clk_divider #(.DIV(5))   u_d5  (.clk, .rst_n, .en, .tick(tick5));

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
    for (int c = 0; c < 5000; c++) begin
      en = (c < 200) ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      #1;
      // counts of enabled cycles so far, including this one
      checks++;
      if (tick64 !== (en && ((n_en + 1) % 64 == 0))) begin
        failures++;
        $display("c=%0d div64 tick=%0b expected %0b", c, tick64, en && ((n_en + 1) % 64 == 0));
      end
      checks++;
      if (tick5 !== (en && ((n_en + 1) % 5 == 0))) begin
        failures++;
        $display("c=%0d div5 tick=%0b", c, tick5);
      end
      if (tick64) n_tick64++;
      if (tick5)  n_tick5++;
      if (en)     n_en++;
      @(negedge clk);
    end
    checks++;
    if (n_tick64 != n_en / 64 || n_tick5 != n_en / 5) begin
      failures++;
      $display("tick totals %0d %0d for %0d enables", n_tick64, n_tick5, n_en);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
