// tb_prog_shift_reg: drives a random bit stream through the programmable
// shift register in each field setting and checks that dout equals din
// delayed by exactly m = 4, 5 or 8 clocks.
module tb_prog_shift_reg;
  import rs_pkg::*;

  logic   clk = 0, rst_n = 0;
  field_e field;
  logic   din = 0, dout;
  int checks = 0, failures = 0;
  int cycles = 0;

  prog_shift_reg dut (.clk, .rst_n, .field, .din, .dout);

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
    logic   hist [$];
    for (int f = 0; f < 3; f++) begin
      rst_n = 0;
      field = fl[f];
      hist.delete();
      @(negedge clk);
      rst_n = 1;
      for (int i = 0; i < 300; i++) begin
        din = 1'($urandom);
        hist.push_back(din);
        @(posedge clk);
        #1;
        // after this edge dout holds the bit driven m clocks ago
        if (hist.size() >= ml[f]) begin
          checks++;
          if (dout !== hist[hist.size() - ml[f]]) begin
            failures++;
            if (failures < 10) $display("FAIL m=%0d i=%0d", ml[f], i);
          end
        end else begin
          checks++;
          if (dout !== 1'b0) failures++;  // still the reset value
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
