// tb_ctrl1_fsm: checks that control1 repeats 0..01 with m-1 zeros for
// m = 4, 5 and 8, that bit_idx counts 0..m-1, and that en low holds it at 0.
module tb_ctrl1_fsm;
  import rs_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  field_e field;
  logic [2:0] bit_idx;
  logic ctrl1;
  int checks = 0, failures = 0, cycles = 0;

  ctrl1_fsm dut (.clk, .rst_n, .en, .field, .bit_idx, .ctrl1);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static field_e fl [3] = '{FIELD_M4, FIELD_M5, FIELD_M8};
    static int     ml [3] = '{4, 5, 8};
    for (int f = 0; f < 3; f++) begin
      field = fl[f];
      rst_n = 0; en = 0;
      @(negedge clk);
      rst_n = 1;
      repeat (3) begin
        @(negedge clk);
        checks++;
        if (bit_idx != 0 || ctrl1) failures++;
      end
      en = 1;
      for (int i = 0; i < 10 * ml[f]; i++) begin
        checks++;
        if (bit_idx != 3'(i % ml[f]) || ctrl1 != ((i % ml[f]) == ml[f] - 1)) begin
          failures++;
          $display("FAIL m=%0d i=%0d idx=%0d ctrl1=%b", ml[f], i, bit_idx, ctrl1);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
