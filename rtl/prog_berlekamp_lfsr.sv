// prog_berlekamp_lfsr: LFSR of the programmable constant Berlekamp
// (dual-basis) bit-serial multiplier, with pipelined parallel load.
//
// A bit-serial dual-basis multiplier keeps the operand b in an m-bit LFSR
// whose state is the dual-basis coordinates (b_j, ..., b_(j+m-1)); each shift
// produces the next coordinate b_(j+m) = sum_i f_i b_(j+i) from the field
// polynomial f(x). The inner product of the state with the polynomial-basis
// bits of a constant c gives bit j of the product b*c in the dual basis, so
// one LFSR serves every constant multiplier of the encoder (see
// gf2_inner_product).
//
// The LFSR is 8 stages long, z7 -> z6 -> ... -> z0, and two multiplexers
// shorten it to 5 or 4 stages, selected by {m1, m0}: new bits enter at z7
// (m = 8), at z4 (m = 5, via the m1 multiplexer) or at z3 (m = 4, via the m0
// multiplexer); z0 is the oldest coordinate. This follows the programmable
// multiplier this design is based on. Its feedback taps here come from the
// field polynomials of rs_pkg.
//
// Pipelining: the operand arrives bit-serially (din, dual-basis bit 0 first)
// during one symbol slot. Seven staging flip-flops hold the first m-1 bits;
// on the slot's last clock (load = control1 = 1) the m bits are loaded in
// parallel and the LFSR then shifts through the next slot while the next
// operand is being collected. So z is the state for operand s during slot
// s+1. Reset to zero is this design's choice.
module prog_berlekamp_lfsr
  import rs_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,  // asynchronous, active low
  input  field_e          field,  // {m1, m0}
  input  logic            din,    // serial operand, dual basis, bit 0 first
  input  logic            load,   // control1: high on the last bit of a symbol
  output logic [MMAX-1:0] z       // LFSR state, z[0] = current coordinate
);

  logic [MMAX-2:0] stg;      // stg[d] = din of d+1 clocks ago
  logic [MMAX-1:0] hist;     // hist[d] = din of d clocks ago (hist[0] = din)
  logic [MMAX-1:0] z_shift;  // state after one LFSR step
  logic [MMAX-1:0] z_load;   // operand coordinates in LFSR order
  logic            fb4, fb5, fb8;

  always_comb begin
    fb4 = ^(z[3:0] & FPOLY4[3:0]);
    fb5 = ^(z[4:0] & FPOLY5[4:0]);
    fb8 = ^(z & FPOLY8);

    z_shift[7] = fb8;
    z_shift[6] = z[7];
    z_shift[5] = z[6];
    z_shift[4] = field[1] ? z[5] : fb5;  // m1 multiplexer
    z_shift[3] = field[0] ? z[4] : fb4;  // m0 multiplexer
    z_shift[2] = z[3];
    z_shift[1] = z[2];
    z_shift[0] = z[1];

    hist = {stg, din};
    z_load = '0;
    case (field)
      FIELD_M4: for (int j = 0; j < 4; j++) z_load[j] = hist[3 - j];
      FIELD_M5: for (int j = 0; j < 5; j++) z_load[j] = hist[4 - j];
      default:  for (int j = 0; j < 8; j++) z_load[j] = hist[7 - j];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stg <= '0;
      z   <= '0;
    end else begin
      stg <= {stg[MMAX-3:0], din};
      z   <= load ? z_load : z_shift;
    end
  end

endmodule
