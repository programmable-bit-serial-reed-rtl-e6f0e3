// gf2_inner_product: programmable 4-, 5- or 8-bit GF(2) inner product.
//
// Forms sum_i z[i] & c[i] (mod 2), the one-bit output of a constant
// bit-serial Berlekamp multiplier: z is the multiplier's LFSR state (the
// operand in the dual basis) and c is the constant in the polynomial basis.
// As in the encoder this follows, the unit is 8 AND gates, a chain of 7 XOR
// gates and a 3:1 multiplexer that picks the partial sum after 4, 5 or 8
// terms according to the field select {m1, m0}; LFSR bits above m-1 hold
// stale values and are thereby ignored.
//
// Purely combinational; no clock.
module gf2_inner_product
  import rs_pkg::*;
(
  input  field_e           field,  // {m1, m0}
  input  logic [MMAX-1:0]  z,      // LFSR state z_0..z_7
  input  logic [MMAX-1:0]  c,      // constant, polynomial basis
  output logic             y
);

  logic [MMAX-1:0] prod;
  logic [MMAX-1:0] psum;  // psum[i] = XOR of prod[0..i]

  assign prod = z & c;

  // XOR chain of the 8 partial products
  for (genvar i = 0; i < MMAX; i++) begin : g_chain
    if (i == 0) begin : g_head
      assign psum[i] = prod[0];
    end else begin : g_tail
      assign psum[i] = psum[i-1] ^ prod[i];
    end
  end

  always_comb begin
    case (field)
      FIELD_M4: y = psum[3];
      FIELD_M5: y = psum[4];
      default:  y = psum[7];
    endcase
  end

endmodule
