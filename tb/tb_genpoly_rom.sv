// tb_genpoly_rom: for all 64 select combinations checks the valid flag
// against the list of 18 supported (n, k) codes, and for each supported code
// that the 2t coefficients sit at the top of the output, that the positions
// below are zero, and that the monic g(x) they define vanishes at its 2t
// consecutive roots alpha^b .. alpha^(b+2t-1), b = 2^(m-1) - t, and at no
// other power of alpha. A second instance with SYMMETRIC = 0 must vanish at
// alpha^1 .. alpha^2t instead.
module tb_genpoly_rom;
  import rs_pkg::*;
  import tb_gf_ref_pkg::*;

  field_e     field;
  logic [3:0] tsel;
  logic       valid;
  logic [NPAR-1:0][MMAX-1:0] g;
  int checks = 0, failures = 0;

  logic valid_b1;
  logic [NPAR-1:0][MMAX-1:0] g_b1;

  genpoly_rom dut (.field, .tsel, .valid, .g);
  // the non-symmetric variant, roots alpha^1 .. alpha^2t
  genpoly_rom #(.SYMMETRIC(1'b0)) dut_b1 (.field, .tsel, .valid(valid_b1), .g(g_b1));

  function automatic bit supported(int m, int t);
    case (m)
      4: return t >= 1 && t <= 7;
      5: return t inside {1, 2, 3, 4, 8};
      8: return t inside {1, 2, 3, 4, 8, 16};
      default: return 0;
    endcase
  endfunction

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s field=%b T=%0d", what, field, tsel);
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
    int m, t, b, n, acc, xp, nroots;
    int ncodes = 0;
    for (int f = 0; f < 4; f++) begin
      for (int ts = 0; ts < 16; ts++) begin
        field = field_e'(f);
        tsel  = 4'(ts);
        #1;
        m = (f == 0) ? 4 : (f == 1) ? 5 : (f == 3) ? 8 : 0;
        t = ts + 1;
        chk(valid == supported(m, t), "valid flag");
        if (!(m != 0 && supported(m, t))) begin
          chk(g == '0, "zero output for unsupported code");
          continue;
        end
        ncodes++;
        n = (1 << m) - 1;
        b = first_root(m, t, 1);
        for (int p = 0; p < NPAR - 2*t; p++) chk(g[p] == 0, "unused position zero");
        // evaluate g at every nonzero power of alpha
        nroots = 0;
        for (int e = 0; e < n; e++) begin
          xp  = gpow(2, e, m);
          acc = 1;  // leading coefficient, Horner from the top
          for (int j = 2*t - 1; j >= 0; j--) acc = gmul(acc, xp, m) ^ int'(g[NPAR - 2*t + j]);
          if (e >= b && e < b + 2*t) chk(acc == 0, "root of g");
          if (acc == 0) nroots++;
        end
        chk(nroots == 2*t, "exactly 2t roots");
        // SYMMETRIC = 0 instance: roots alpha^1 .. alpha^2t
        chk(valid_b1 == 1'b1, "valid flag (b = 1)");
        for (int p = 0; p < NPAR - 2*t; p++) chk(g_b1[p] == 0, "unused position zero (b = 1)");
        for (int e = 1; e <= 2*t; e++) begin
          xp  = gpow(2, e, m);
          acc = 1;
          for (int j = 2*t - 1; j >= 0; j--) acc = gmul(acc, xp, m) ^ int'(g_b1[NPAR - 2*t + j]);
          chk(acc == 0, "root of g (b = 1)");
        end
        // self-reciprocal: g_j = g_(2t-j), with g_2t = 1
        chk(g[NPAR - 2*t] == 1, "g_0 = 1");
        for (int j = 1; j < 2*t; j++)
          chk(g[NPAR - 2*t + j] == g[NPAR - j], "symmetric");
      end
    end
    chk(ncodes == 18, "18 codes supported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
