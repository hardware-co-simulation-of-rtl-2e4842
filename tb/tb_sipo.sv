// tb_sipo: random serial bits on randomly spaced bit_en strobes. Every
// second bit, sym must become {first bit, second bit} with sym_load high;
// sym must not change in between.
module tb_sipo;
  import qpsk_pkg::*;
  logic    clk = 1'b0, rst_n = 1'b0, bit_en = 1'b0, din = 1'b0;
  symbol_t sym;
  logic    sym_load, half;
  int checks = 0, failures = 0, n_bits = 0, n_loads = 0;
  logic       first;
  logic [1:0] exp_sym;

  always #5 clk = ~clk;

  sipo u_sipo (.clk, .rst_n, .bit_en, .din, .sym, .sym_load, .half);

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    first   = 1'b0;
    exp_sym = 2'b00;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 4000; c++) begin
      bit_en = 1'($urandom_range(0, 3) == 0);
      din    = 1'($urandom_range(0, 1));
      #1;
      checks++;
      if (sym_load !== (bit_en && (n_bits % 2 == 1))) begin
        failures++;
        $display("c=%0d sym_load %0b", c, sym_load);
      end
      if (bit_en) begin
        if (n_bits % 2 == 0) first = din;
        else begin
          exp_sym = {first, din};
          n_loads++;
        end
        n_bits++;
      end
      @(negedge clk);
      checks++;
      if (sym !== exp_sym) begin
        failures++;
        $display("c=%0d sym %b expected %b", c, sym, exp_sym);
      end
    end
    checks++;
    if (n_loads < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
