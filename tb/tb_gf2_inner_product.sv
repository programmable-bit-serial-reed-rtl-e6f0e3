// tb_gf2_inner_product: checks the programmable GF(2) inner product against
// a bit-by-bit parity over the first m bits, for random operands in each of
// the three field settings, plus walking single bits.
module tb_gf2_inner_product;
  import rs_pkg::*;

  field_e          field;
  logic [MMAX-1:0] z, c;
  logic            y;
  int checks = 0, failures = 0;

  gf2_inner_product dut (.field, .z, .c, .y);

  function automatic logic ref_ip(logic [7:0] zz, logic [7:0] cc, int m);
    logic r = 0;
    for (int i = 0; i < m; i++) r ^= zz[i] & cc[i];
    return r;
  endfunction

  task automatic check(int m);
    #1;
    checks++;
    if (y !== ref_ip(z, c, m)) begin
      failures++;
      $display("FAIL m=%0d z=%h c=%h y=%b", m, z, c, y);
    end
  endtask

  initial begin
    #100000;
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
      for (int i = 0; i < 8; i++) begin
        z = 8'(1) << i; c = 8'hFF; check(ml[f]);
      end
      repeat (300) begin
        z = 8'($urandom); c = 8'($urandom); check(ml[f]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
