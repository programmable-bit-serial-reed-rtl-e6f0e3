// tb_prog_berlekamp_lfsr: feeds random symbols, bit-serially in the dual
// basis, into the programmable Berlekamp LFSR with a load strobe on every
// symbol's last bit. During the following symbol slot the LFSR state must
// hold the operand's dual-basis coordinates j..j+m-1 at bit j, worked out
// with the field trace; and the inner product of the state with a random
// constant c must be coordinate j of the product x*c.
module tb_prog_berlekamp_lfsr;
  import rs_pkg::*;
  import tb_gf_ref_pkg::*;

  logic            clk = 0, rst_n = 0;
  field_e          field;
  logic            din = 0, load = 0;
  logic [MMAX-1:0] z;
  int checks = 0, failures = 0;
  int cycles = 0;

  prog_berlekamp_lfsr dut (.clk, .rst_n, .field, .din, .load, .z);

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
    int m, x, prev_x, cst, exp_bit, ip;
    for (int f = 0; f < 3; f++) begin
      m = ml[f];
      field = fl[f];
      rst_n = 0;
      @(negedge clk);
      rst_n = 1;
      prev_x = -1;
      for (int s = 0; s < 60; s++) begin
        x   = $urandom_range((1 << m) - 1);
        cst = $urandom_range((1 << m) - 1);
        for (int j = 0; j < m; j++) begin
          din  = 1'(dual_bit(x, j, m));
          load = (j == m - 1);
          // state during this slot belongs to the previous operand
          if (prev_x >= 0) begin
            for (int i = 0; i < m; i++) begin
              checks++;
              if (z[i] !== 1'(dual_bit(prev_x, j + i, m))) begin
                failures++;
                if (failures < 10)
                  $display("FAIL m=%0d x=%0d j=%0d z=%b", m, prev_x, j, z);
              end
            end
            ip = 0;
            for (int i = 0; i < m; i++) ip ^= int'(z[i]) & ((cst >> i) & 1);
            exp_bit = dual_bit(gmul(prev_x, cst, m), j, m);
            checks++;
            if (ip != exp_bit) failures++;
          end
          @(negedge clk);
        end
        prev_x = x;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
