// tb_gf_ref_pkg: reference Galois-field arithmetic for the testbenches.
//
// Written independently of the RTL: elements are polynomial-basis integers,
// products use a full field polynomial (x^m term included) and the
// dual-basis coordinates used on the encoder's serial lines are taken with
// the field trace, coordinate j of x being Tr(alpha^j * x).
package tb_gf_ref_pkg;

  function automatic int fpoly(int m);
    case (m)
      4: return 'h13;    // x^4 + x + 1
      5: return 'h25;    // x^5 + x^2 + 1
      default: return 'h11D;  // x^8 + x^4 + x^3 + x^2 + 1
    endcase
  endfunction

  function automatic int gmul(int a, int b, int m);
    int r = 0;
    while (b != 0) begin
      if ((b & 1) != 0) r ^= a;
      b >>= 1;
      a <<= 1;
      if ((a & (1 << m)) != 0) a ^= fpoly(m);
    end
    return r;
  endfunction

  function automatic int gpow(int a, int e, int m);
    int r = 1;
    for (int i = 0; i < e; i++) r = gmul(r, a, m);
    return r;
  endfunction

  // Field trace, 0 or 1
  function automatic int trace(int x, int m);
    int s = 0, y = x;
    for (int i = 0; i < m; i++) begin
      s ^= y;
      y = gmul(y, y, m);
    end
    return s;
  endfunction

  // Dual-basis coordinate j of x (j may exceed m-1)
  function automatic int dual_bit(int x, int j, int m);
    return trace(gmul(gpow(2, j, m), x, m), m);
  endfunction

  // All m dual-basis coordinates of x, bit j = coordinate j
  function automatic int to_dual(int x, int m);
    int d = 0;
    for (int j = 0; j < m; j++) d |= dual_bit(x, j, m) << j;
    return d;
  endfunction

  function automatic int from_dual(int d, int m);
    for (int x = 0; x < (1 << m); x++) if (to_dual(x, m) == d) return x;
    return -1;
  endfunction

  function automatic int first_root(int m, int t, bit symmetric);
    return symmetric ? (1 << (m - 1)) - t : 1;
  endfunction

endpackage
