// berlekamp_mult: traditional Berlekamp bit-serial multiplier over GF(2^M)
// with a variable multiplier held in registers.
//
// Computes a = b * c. The operand b is loaded in parallel in the dual basis
// (b_dual[j] = L(alpha^j b)) into an M-stage LFSR whose feedback taps are the
// non-zero coefficients f_1..f_(M-1) (and f_0 = 1) of the field polynomial
// f(x). The multiplier c is loaded in the polynomial basis into a row of M
// registers below the LFSR. Each clock, M AND gates and M-1 XOR gates form
// the inner product of the LFSR state with c, which is one dual-basis bit of
// the product, and the LFSR steps to the next coordinate of b. After M
// clocks the M bits of a have left on 'a_bit', bit 0 first.
//
// This is the general form of the multiplier; the encoder uses its
// constant variant (prog_berlekamp_lfsr with gf2_inner_product), in which
// the c registers are replaced by hardwired constants. The structure follows
// the multiplier's usual schematic; the parameter defaults (GF(2^8),
// x^8+x^4+x^3+x^2+1), the load interface and the reset are this design's.
//
// Timing: with load = 1 at a clock edge, b and c are captured; in the clock
// after that edge a_bit is bit 0 of b*c, then bits 1..M-1 in the following
// clocks (the LFSR keeps running and later bits are not meaningful).
module berlekamp_mult #(
  parameter int unsigned     M     = 8,
  parameter logic [M-1:0]    FTAPS = M'(8'h1D)  // f_0..f_(M-1), x^M omitted
) (
  input  logic         clk,
  input  logic         rst_n,   // asynchronous, active low
  input  logic         load,    // capture b_dual and c
  input  logic [M-1:0] b_dual,  // operand, dual basis
  input  logic [M-1:0] c,       // multiplier, polynomial basis
  output logic         a_bit    // serial product, dual basis
);

  logic [M-1:0] lfsr;  // lfsr[0] = current dual coordinate
  logic [M-1:0] creg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr <= '0;
      creg <= '0;
    end else if (load) begin
      lfsr <= b_dual;
      creg <= c;
    end else begin
      lfsr <= {^(lfsr & FTAPS), lfsr[M-1:1]};
    end
  end

  assign a_bit = ^(lfsr & creg);

endmodule
