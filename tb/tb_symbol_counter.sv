// tb_symbol_counter: drives control1 every m-th clock and checks that the
// count advances once per symbol, wraps from n-1 = 2^m - 2 to 0, and that
// cw_last is high only on the last clock of each codeword.
module tb_symbol_counter;
  import rs_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, ctrl1 = 0;
  field_e field;
  logic [MMAX-1:0] count;
  logic cw_last;
  int checks = 0, failures = 0, cycles = 0;

  symbol_counter dut (.clk, .rst_n, .en, .field, .ctrl1, .count, .cw_last);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static field_e fl [3] = '{FIELD_M4, FIELD_M5, FIELD_M8};
    static int     ml [3] = '{4, 5, 8};
    int m, n, sym, wraps;
    for (int f = 0; f < 3; f++) begin
      field = fl[f];
      m = ml[f];
      n = (1 << m) - 1;
      rst_n = 0; en = 0;
      @(negedge clk);
      rst_n = 1; en = 1;
      wraps = 0;
      for (int i = 0; i < 2 * n * m + 3 * m; i++) begin
        ctrl1 = ((i % m) == m - 1);
        sym   = (i / m) % n;
        #1;
        checks++;
        if (count != 8'(sym)) begin
          failures++;
          if (failures < 10) $display("FAIL m=%0d i=%0d count=%0d exp=%0d", m, i, count, sym);
        end
        checks++;
        if (cw_last != (ctrl1 && sym == n - 1)) failures++;
        if (cw_last) wraps++;
        @(negedge clk);
      end
      checks++;
      if (wraps != 2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
