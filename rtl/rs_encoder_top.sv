// rs_encoder_top: programmable bit-serial (n, k) Reed-Solomon encoder.
//
// Encodes systematic RS codewords over GF(2^4), GF(2^5) or GF(2^8), n = 2^m-1,
// for the 18 codes of genpoly_rom, one bit per clock. Symbols travel
// bit-serially in the dual basis (coordinate j of x is L(alpha^j x) for the
// linear functional L the user picks, e.g. the field trace), bit 0 first.
//
// Datapath (a classic LFSR division by g(x), made bit-serial):
//   * feedback fb = control2 & (din ^ e), where e is the end of the check
//     chain; during the check symbols control2 = 0 and fb = 0;
//   * one programmable Berlekamp multiplier (prog_berlekamp_lfsr) collects
//     fb over a symbol slot and is loaded on control1; during the next slot
//     32 inner-product units (gf2_inner_product) form, bit by bit, the
//     products g[p]*fb of all constants at once;
//   * 31 programmable one-symbol delays (prog_shift_reg) r0..r30 chained by
//     XORs: input of r0 = P0, input of rp = r(p-1) ^ Pp, e = r30 ^ P31.
// Because the multiplier adds one symbol of delay, 2t products need only
// 2t-1 delay stages. genpoly_rom aligns g_0..g_(2t-1) to the last 2t chain
// positions and zeroes the rest, so a shorter code uses the tail of the chain.
// At the end of every codeword the chain and the multiplier are empty again,
// so consecutive codewords may use different fields and different t.
//
// Control: ctrl1_fsm (control1, last bit of a symbol), symbol_counter (symbol
// index, advances every m clocks) and ctrl2_fsm (control2, high for the m*k
// information clocks). The six select lines {m1, m0, T[3:0]} are sampled on
// the last clock of each codeword (and on the first clock after reset) and
// hold for the whole next codeword.
//
// Interface and timing: after reset release the encoder spends one clock
// idle, then runs codewords back to back, n*m clocks each. cw_start marks the
// first clock of a codeword, info (= control2) the clocks in which din must
// carry message bits, sym_last the last bit of each symbol. dout is
// registered: in clock c+1 it carries the codeword bit of clock c (message
// bit when dout_info = 1, check bit otherwise); dout_first marks the first
// bit of each output codeword and dout_valid that a codeword is under way.
// cfg_valid reports whether the sampled selects name one of the 18 codes.
//
// Beside the encoder, and not connected to it, the top also carries one
// general Berlekamp multiplier (berlekamp_mult) with its multiplier operand in
// registers, with its own tbm_* ports: the form the encoder's constant
// multipliers are derived from.
//
// The structure (2t multipliers sharing one Berlekamp LFSR, 2t-1 programmable
// delays, table-based g(x), control1/control2 generation) follows the encoder
// this design is based on; the interface signals, the idle clock, the
// sampling of the selects and the chain alignment are this design's choices.
module rs_encoder_top
  import rs_pkg::*;
#(
  parameter bit SYMMETRIC = 1'b1  // self-reciprocal g(x) (see genpoly_rom)
) (
  input  logic       clk,
  input  logic       rst_n,      // asynchronous, active low
  input  logic       m1,         // field select, see Table in rs_pkg
  input  logic       m0,
  input  logic [3:0] T,          // t = T + 1
  input  logic       din,        // message bits while info = 1
  output logic       cw_start,   // first clock of a codeword
  output logic       info,       // control2: message clock
  output logic       sym_last,   // control1: last bit of a symbol
  output logic       cfg_valid,  // current selects are a supported code
  output logic       dout,       // encoded bit of the previous clock
  output logic       dout_info,  // dout is a message bit
  output logic       dout_first, // dout is the first bit of a codeword
  output logic       dout_valid, // dout is part of a codeword
  // Stand-alone general Berlekamp multiplier over GF(2^8) (berlekamp_mult),
  // independent of the encoder datapath
  input  logic       tbm_load,   // capture tbm_b_dual and tbm_c
  input  logic [7:0] tbm_b_dual, // operand, dual basis
  input  logic [7:0] tbm_c,      // multiplier, polynomial basis
  output logic       tbm_a_bit   // serial product, dual basis
);

  localparam int unsigned NSR = NPAR - 1;  // 31 delay stages

  rs_cfg_t cfg;
  logic    run;       // codewords running (low during the idle clock)
  logic    ctrl1, ctrl2, cw_last;
  logic [2:0]      bit_idx;
  logic [MMAX-1:0] sym_cnt;
  logic [NPAR-1:0][MMAX-1:0] g;
  logic [MMAX-1:0] z;
  logic [NPAR-1:0] prod;     // serial products g[p] * fb
  logic [NSR-1:0]  sr_in, sr_out;
  logic            chain_end, fb, enc_bit;

  // Select lines: sampled at the first clock after reset and at the last
  // clock of every codeword.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      cfg <= '{field: FIELD_M4, tsel: 4'd0};
    end else begin
      run <= 1'b1;
      if (!run || cw_last) cfg <= '{field: field_e'({m1, m0}), tsel: T};
    end
  end

  ctrl1_fsm u_ctrl1 (
    .clk, .rst_n, .en(run), .field(cfg.field), .bit_idx, .ctrl1
  );

  symbol_counter u_symcnt (
    .clk, .rst_n, .en(run), .field(cfg.field), .ctrl1, .count(sym_cnt), .cw_last
  );

  ctrl2_fsm u_ctrl2 (
    .field(cfg.field), .tsel(cfg.tsel), .count(sym_cnt), .ctrl2
  );

  genpoly_rom #(.SYMMETRIC(SYMMETRIC)) u_rom (
    .field(cfg.field), .tsel(cfg.tsel), .valid(cfg_valid), .g
  );

  assign fb = run && ctrl2 && (din ^ chain_end);

  prog_berlekamp_lfsr u_mult (
    .clk, .rst_n, .field(cfg.field), .din(fb), .load(ctrl1), .z
  );

  for (genvar p = 0; p < NPAR; p++) begin : g_ip
    gf2_inner_product u_ip (.field(cfg.field), .z, .c(g[p]), .y(prod[p]));
  end

  for (genvar p = 0; p < NSR; p++) begin : g_sr
    if (p == 0) begin : g_first
      assign sr_in[p] = prod[0];
    end else begin : g_next
      assign sr_in[p] = sr_out[p-1] ^ prod[p];
    end
    prog_shift_reg u_sr (
      .clk, .rst_n, .field(cfg.field), .din(sr_in[p]), .dout(sr_out[p])
    );
  end

  assign chain_end = sr_out[NSR-1] ^ prod[NPAR-1];
  assign enc_bit   = ctrl2 ? din : chain_end;

  assign cw_start = run && (sym_cnt == '0) && (bit_idx == '0);
  assign info     = run && ctrl2;
  assign sym_last = ctrl1;

  berlekamp_mult #(.M(MMAX), .FTAPS(FPOLY8)) u_tbm (
    .clk, .rst_n, .load(tbm_load), .b_dual(tbm_b_dual), .c(tbm_c), .a_bit(tbm_a_bit)
  );

  // A codeword ends on a symbol boundary, and no feedback enters the
  // multiplier while check symbols are being shifted out.
  a_cw_on_symbol: assert property (@(posedge clk) disable iff (!rst_n) cw_last |-> ctrl1)
    else $error("codeword end not on a symbol boundary");
  a_no_fb_in_check: assert property (@(posedge clk) disable iff (!rst_n) !ctrl2 |-> !fb)
    else $error("feedback during check symbols");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout       <= 1'b0;
      dout_info  <= 1'b0;
      dout_first <= 1'b0;
      dout_valid <= 1'b0;
    end else begin
      dout       <= run && enc_bit;
      dout_info  <= info;
      dout_first <= cw_start;
      dout_valid <= run;
    end
  end

endmodule
