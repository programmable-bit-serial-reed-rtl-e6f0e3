// tb_berlekamp_mult: loads random b (dual basis, via the field trace) and c
// (polynomial basis) into the traditional Berlekamp multiplier and checks the
// M serial output bits against the dual-basis coordinates of b*c computed
// with reference field arithmetic. Runs the default GF(2^8) instance and a
// GF(2^4) and GF(2^5) instance.
module tb_berlekamp_mult;
  import tb_gf_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0;
  logic [7:0] b8, c8;
  logic [4:0] b5, c5;
  logic [3:0] b4, c4;
  logic a8, a5, a4;
  int checks = 0, failures = 0, cycles = 0;

  berlekamp_mult                                   dut8 (.clk, .rst_n, .load, .b_dual(b8), .c(c8), .a_bit(a8));
  berlekamp_mult #(.M(5), .FTAPS(5'h05))           dut5 (.clk, .rst_n, .load, .b_dual(b5), .c(c5), .a_bit(a5));
  berlekamp_mult #(.M(4), .FTAPS(4'h3))            dut4 (.clk, .rst_n, .load, .b_dual(b4), .c(c4), .a_bit(a4));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x8, y8, x5, y5, x4, y4;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (200) begin
      x8 = $urandom_range(255); y8 = $urandom_range(255);
      x5 = $urandom_range(31);  y5 = $urandom_range(31);
      x4 = $urandom_range(15);  y4 = $urandom_range(15);
      b8 = 8'(to_dual(x8, 8)); c8 = 8'(y8);
      b5 = 5'(to_dual(x5, 5)); c5 = 5'(y5);
      b4 = 4'(to_dual(x4, 4)); c4 = 4'(y4);
      load = 1;
      @(negedge clk);
      load = 0;
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (a8 !== 1'(dual_bit(gmul(x8, y8, 8), j, 8))) failures++;
        if (j < 5) begin
          checks++;
          if (a5 !== 1'(dual_bit(gmul(x5, y5, 5), j, 5))) failures++;
        end
        if (j < 4) begin
          checks++;
          if (a4 !== 1'(dual_bit(gmul(x4, y4, 4), j, 4))) failures++;
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
