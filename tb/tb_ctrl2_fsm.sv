// tb_ctrl2_fsm: for every field, every T and every symbol index of a
// codeword checks that control2 is high for the first k = n - 2t symbols
// and low for the remaining 2t.
module tb_ctrl2_fsm;
  import rs_pkg::*;

  field_e field;
  logic [3:0] tsel;
  logic [MMAX-1:0] count;
  logic ctrl2;
  int checks = 0, failures = 0;

  ctrl2_fsm dut (.field, .tsel, .count, .ctrl2);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static field_e fl [3] = '{FIELD_M4, FIELD_M5, FIELD_M8};
    static int     ml [3] = '{4, 5, 8};
    int n, t, high;
    for (int f = 0; f < 3; f++) begin
      n = (1 << ml[f]) - 1;
      for (int ts = 0; ts < 16; ts++) begin
        t = ts + 1;
        if (2 * t >= n) continue;
        field = fl[f];
        tsel = 4'(ts);
        high = 0;
        for (int s = 0; s < n; s++) begin
          count = 8'(s);
          #1;
          checks++;
          if (ctrl2 != (s < n - 2 * t)) begin
            failures++;
            if (failures < 10) $display("FAIL n=%0d t=%0d s=%0d", n, t, s);
          end
          if (ctrl2) high++;
        end
        checks++;
        if (high != n - 2 * t) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
