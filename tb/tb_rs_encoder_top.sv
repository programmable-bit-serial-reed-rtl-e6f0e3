// tb_rs_encoder_top: end-to-end test of the programmable bit-serial RS
// encoder at its default parameters.
//
// The encoder runs codewords back to back. The testbench changes the six
// select lines every codeword: first all 18 supported (n, k) codes in turn,
// then a random sequence of them, then one unsupported combination. For each
// codeword it sends random message symbols bit-serially in the dual basis
// (coordinate j = Tr(alpha^j x)), collects the output codeword and checks:
//   * the first k symbols are the message, flagged by dout_info;
//   * the 2t check symbols equal the remainder of u(x) x^(2t) mod g(x),
//     computed here by long division with g(x) built from its roots;
//   * the codeword polynomial vanishes at alpha^b .. alpha^(b+2t-1);
//   * a codeword lasts n*m clocks and its first output bit leaves one clock
//     after its first input bit; info is high for m*k clocks.
// A second process exercises the stand-alone general Berlekamp multiplier
// brought out on the tbm_* ports: random GF(256) products, bit by bit.
// It also counts the mechanisms the design has - each field, each t, field
// switches between consecutive codewords, t changes, check-symbol phases,
// the unsupported-select flag - and fails if any never occurred.
module tb_rs_encoder_top;
  import tb_gf_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic m1, m0;
  logic [3:0] T;
  logic din = 0;
  logic cw_start, info, sym_last, cfg_valid;
  logic dout, dout_info, dout_first, dout_valid;
  logic tbm_load = 0, tbm_a_bit;
  logic [7:0] tbm_b_dual = 0, tbm_c = 0;

  rs_encoder_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d: %s", cycles, what);
    end
  endtask

  // ---------------------------------------------------------------- codes
  typedef struct { int m; int t; bit ok; } code_t;
  code_t sched [$];
  int    inv_dual [3][256];   // dual coordinates -> element, per field

  function automatic int fidx(int m);
    return (m == 4) ? 0 : (m == 5) ? 1 : 2;
  endfunction

  // Remainder of u(x) x^(2t) mod g(x); msg[0] is the highest-degree symbol.
  // Returns check symbols in transmission order (highest degree first).
  function automatic void ref_parity(int m, int t, int msg[$], ref int par[$]);
    int g [$];
    int r [$];
    int b, fbk, n2;
    n2 = 2 * t;
    b = first_root(m, t, 1);
    g = {1};  // g[j] = coefficient of x^j
    for (int i = 0; i < n2; i++) begin
      automatic int root = gpow(2, b + i, m);
      automatic int ng [$];
      ng = {};
      for (int j = 0; j <= g.size(); j++) begin
        automatic int hi = (j > 0) ? g[j-1] : 0;
        automatic int lo = (j < g.size()) ? gmul(g[j], root, m) : 0;
        ng.push_back(hi ^ lo);
      end
      g = ng;
    end
    r = {};
    for (int j = 0; j < n2; j++) r.push_back(0);
    foreach (msg[s]) begin
      fbk = msg[s] ^ r[n2-1];
      for (int j = n2 - 1; j > 0; j--) r[j] = r[j-1] ^ gmul(g[j], fbk, m);
      r[0] = gmul(g[0], fbk, m);
    end
    par = {};
    for (int j = n2 - 1; j >= 0; j--) par.push_back(r[j]);
  endfunction

  // ------------------------------------------------------------- counters
  int n_field [3];
  int n_t [17];
  int n_field_switch = 0, n_t_change = 0, n_parity_phase = 0, n_bad_cfg = 0;

  // ------------------------------------------- stand-alone TBM multiplier
  int n_tbm = 0;
  initial begin
    int x, y;
    wait (rst_n);
    repeat (50) begin
      @(negedge clk);
      x = $urandom_range(255);
      y = $urandom_range(255);
      tbm_b_dual = 8'(to_dual(x, 8));
      tbm_c = 8'(y);
      tbm_load = 1;
      @(negedge clk);
      tbm_load = 0;
      for (int j = 0; j < 8; j++) begin
        chk(tbm_a_bit == 1'(dual_bit(gmul(x, y, 8), j, 8)), "general multiplier product bit");
        @(negedge clk);
      end
      n_tbm++;
    end
  end

  // ------------------------------------------------------------ stimulus
  int cw_in = -1;            // index of the codeword being fed
  int msg_q [$][$];          // messages per codeword
  int in_bit = 0;            // bit position within the current codeword
  longint start_cycle [$];   // cycle of each cw_start
  int info_cnt [$];
  int sym_cnt [$];           // sym_last pulses per codeword

  task automatic apply_sel(int i);
    code_t c;
    if (i >= sched.size()) c = sched[sched.size()-1];
    else c = sched[i];
    if (!c.ok) begin
      {m1, m0} = 2'b10; T = 4'd5;
    end else begin
      {m1, m0} = (c.m == 4) ? 2'b00 : (c.m == 5) ? 2'b01 : 2'b11;
      T = 4'(c.t - 1);
    end
  endtask

  // ------------------------------------------------------------- checking
  int out_cw = -1;
  int out_bits [$];
  int out_info [$];
  longint out_first_cycle [$];

  task automatic check_codeword(int i);
    code_t c = sched[i];
    int m = c.m, t = c.t, n, k, d, acc, xp, b;
    int sym [$];
    int par [$];
    n = (1 << m) - 1;
    k = n - 2 * t;
    chk(out_bits.size() == n * m, "codeword length in bits");
    for (int s = 0; s < n; s++) begin
      d = 0;
      for (int j = 0; j < m; j++) d |= out_bits[s*m + j] << j;
      sym.push_back(inv_dual[fidx(m)][d]);
    end
    for (int s = 0; s < n * m; s++) chk(out_info[s] == int'(s < k * m), "dout_info flag");
    for (int s = 0; s < k; s++) chk(sym[s] == msg_q[i][s], "message symbol passes through");
    ref_parity(m, t, msg_q[i], par);
    for (int j = 0; j < 2 * t; j++) begin
      checks++;
      if (sym[k + j] != par[j]) begin
        failures++;
        if (failures < 20)
          $display("FAIL cw %0d (n=%0d,k=%0d) check symbol %0d: got %0d exp %0d",
                   i, n, k, j, sym[k + j], par[j]);
      end
    end
    b = first_root(m, t, 1);
    for (int r = 0; r < 2 * t; r++) begin
      xp = gpow(2, b + r, m);
      acc = 0;
      for (int s = 0; s < n; s++) acc = gmul(acc, xp, m) ^ sym[s];
      chk(acc == 0, "codeword vanishes at the roots of g(x)");
    end
    n_parity_phase++;
    n_field[fidx(m)]++;
    n_t[t]++;
    if (i > 0) begin
      if (sched[i-1].m != m) n_field_switch++;
      if (sched[i-1].t != t) n_t_change++;
    end
  endtask

  initial begin
    static int mlist [3] = '{4, 5, 8};
    int k, n, ncw;
    int msg [$];
    code_t c;
    // dual-basis decode tables
    for (int f = 0; f < 3; f++)
      for (int x = 0; x < (1 << mlist[f]); x++) inv_dual[f][to_dual(x, mlist[f])] = x;
    // schedule
    for (int t = 1; t <= 7; t++) sched.push_back('{4, t, 1});
    foreach (mlist[f]) if (mlist[f] != 4)
      foreach (n_t[t]) if (t inside {1, 2, 3, 4, 8} || (mlist[f] == 8 && t == 16))
        sched.push_back('{mlist[f], t, 1});
    repeat (10) begin
      automatic int r = $urandom_range(17);
      sched.push_back(sched[r]);
    end
    ncw = sched.size();
    sched.push_back('{8, 6, 0});   // unsupported, only the flag is checked

    apply_sel(0);
    repeat (3) @(negedge clk);
    rst_n = 1;        // idle clock: selects sampled at its end
    #1;
    chk(!cw_start && !info && !dout_valid, "idle clock after reset");
    @(negedge clk);

    forever begin
      // inputs of this clock, decided from the DUT's control outputs
      if (cw_start) begin
        cw_in++;
        start_cycle.push_back(cycles);
        info_cnt.push_back(0);
        sym_cnt.push_back(0);
        in_bit = 0;
        if (cw_in < ncw) begin
          c = sched[cw_in];
          chk(cfg_valid == 1'b1, "supported selects flagged valid");
          n = (1 << c.m) - 1;
          k = n - 2 * c.t;
          msg = {};
          for (int s = 0; s < k; s++) msg.push_back($urandom_range(n));
          msg_q.push_back(msg);
        end else begin
          chk(cfg_valid == 1'b0, "unsupported selects flagged invalid");
          n_bad_cfg++;
          break;
        end
        apply_sel(cw_in + 1);
      end
      if (cw_in >= 0) begin
        c = sched[cw_in];
        if (sym_last) sym_cnt[cw_in]++;
        if (info) begin
          info_cnt[cw_in]++;
          din = 1'(dual_bit(msg_q[cw_in][in_bit / c.m], in_bit % c.m, c.m));
        end else begin
          din = 1'($urandom);   // ignored during check symbols
        end
        in_bit++;
      end
      @(posedge clk);
      #1;
      // registered outputs now describe the clock just finished
      if (dout_first) begin
        if (out_cw >= 0) check_codeword(out_cw);
        out_cw++;
        out_bits = {};
        out_info = {};
        out_first_cycle.push_back(cycles);
      end
      if (dout_valid && out_cw >= 0) begin
        out_bits.push_back(int'(dout));
        out_info.push_back(int'(dout_info));
      end
      @(negedge clk);
    end

    // timing: codeword length and latency
    for (int i = 0; i < ncw; i++) begin
      c = sched[i];
      n = (1 << c.m) - 1;
      chk(start_cycle[i+1] - start_cycle[i] == longint'(n * c.m), "codeword lasts n*m clocks");
      chk(out_first_cycle[i] - start_cycle[i] == 1, "one clock of latency");
      chk(info_cnt[i] == (n - 2 * c.t) * c.m, "info high for m*k clocks");
      chk(sym_cnt[i] == n, "one symbol strobe every m clocks");
    end
    chk(out_cw == ncw - 1, "all codewords started at the output");

    $display("codewords: m=4 %0d, m=5 %0d, m=8 %0d; field switches %0d; t changes %0d; t=16 %0d; check phases %0d; unsupported %0d; general products %0d",
             n_field[0], n_field[1], n_field[2], n_field_switch, n_t_change, n_t[16],
             n_parity_phase, n_bad_cfg, n_tbm);
    chk(n_field[0] > 0, "GF(16) codeword seen");
    chk(n_field[1] > 0, "GF(32) codeword seen");
    chk(n_field[2] > 0, "GF(256) codeword seen");
    chk(n_field_switch > 0, "field switch between codewords seen");
    chk(n_t_change > 0, "t change between codewords seen");
    for (int t = 1; t <= 16; t++)
      if (t inside {1, 2, 3, 4, 5, 6, 7, 8, 16}) chk(n_t[t] > 0, "every t seen");
    chk(n_parity_phase > 0, "check-symbol phase seen");
    chk(n_bad_cfg > 0, "unsupported selects seen");
    chk(n_tbm == 50, "general multiplier products checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
