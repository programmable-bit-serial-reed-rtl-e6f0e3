// genpoly_rom: combinational look-up table of generator polynomial
// coefficients for the 18 codes the encoder supports.
//
//   n = 15  (m = 4): t = 1..7           k = 13, 11, 9, 7, 5, 3, 1
//   n = 31  (m = 5): t = 1, 2, 3, 4, 8  k = 29, 27, 25, 23, 15
//   n = 255 (m = 8): t = 1, 2, 3, 4, 8, 16  k = 253, 251, 249, 247, 239, 223
//
// Six select lines address it: {m1, m0} (field) and T[3:0] (t = T + 1).
// Output g[p], p = 0..31, is the polynomial-basis constant of the p-th
// multiplier of the encoder's check-symbol chain. The 2t coefficients
// g_0..g_(2t-1) of the monic g(x) sit at the top, g[32-2t+j] = g_j, and the
// positions below are zero, so a shorter code simply uses the last 2t stages
// of the chain. Any other select combination gives valid = 0 and g = 0.
//
// Generating g(x) by table rather than by an on-line sequential circuit, and
// building the table as logic, follows the encoder this design is based on.
// The table contents are computed at elaboration from
//   g(x) = prod_{i=0}^{2t-1} (x + alpha^(b+i))
// with b = 2^(m-1) - t (self-reciprocal g(x)) when SYMMETRIC = 1, and b = 1
// otherwise; alpha is a root of the rs_pkg field polynomial. The choice of
// roots is this design's.
module genpoly_rom
  import rs_pkg::*;
#(
  parameter bit SYMMETRIC = 1'b1
) (
  input  field_e                     field,  // {m1, m0}
  input  logic [3:0]                 tsel,   // T[3:0], t = T + 1
  output logic                       valid,  // selected (n, k) is in the table
  output logic [NPAR-1:0][MMAX-1:0]  g       // aligned coefficients
);

  localparam int unsigned NCODES = 18;  // (n, k) codes in the table

  typedef logic [NCODES-1:0][NPAR-1:0][MMAX-1:0] gtab_t;

  function automatic gtab_t build_table();
    gtab_t tab;
    tab = '0;
    for (int unsigned r = 0; r < NCODES; r++)
      tab[r] = gen_poly(code_m(r), code_t(r), SYMMETRIC);
    return tab;
  endfunction

  localparam gtab_t GTAB = build_table();

  // Table row of a select combination, or -1.
  function automatic int row_of(field_e f, logic [3:0] ts);
    case (f)
      FIELD_M4: return (ts <= 4'd6) ? int'(ts) : -1;
      FIELD_M5: begin
        if (ts <= 4'd3)  return 7 + int'(ts);
        if (ts == 4'd7)  return 11;
        return -1;
      end
      FIELD_M8: begin
        if (ts <= 4'd3)  return 12 + int'(ts);
        if (ts == 4'd7)  return 16;
        if (ts == 4'd15) return 17;
        return -1;
      end
      default: return -1;
    endcase
  endfunction

  always_comb begin
    int r;
    r     = row_of(field, tsel);
    valid = (r >= 0);
    g     = '0;
    for (int p = 0; p < NPAR; p++)
      for (int q = 0; q < NCODES; q++)
        if (r == q) g[p] = GTAB[q][p];
  end

endmodule
