// ctrl2_fsm: programmable FSM generating control2.
//
// control2 is high while the k information symbols of a codeword pass
// through the encoder (and feed its check-symbol chain) and low while the 2t
// check symbols are shifted out: high for m*k clocks, then low for m*2t
// clocks. It is decoded from the symbol counter value and the six select
// lines: control2 = (count < k) with k = 2^m - 1 - 2t, m from {m1, m0} and
// t = T + 1. Reducing the FSM to this comparison is this design's choice.
// Purely combinational.
module ctrl2_fsm
  import rs_pkg::*;
(
  input  field_e          field,  // {m1, m0}
  input  logic [3:0]      tsel,   // T[3:0]
  input  logic [MMAX-1:0] count,  // symbol counter
  output logic            ctrl2   // 1: information symbol, 0: check symbol
);

  logic [MMAX-1:0] n, k;

  always_comb begin
    case (field)
      FIELD_M4: n = 8'd15;
      FIELD_M5: n = 8'd31;
      default:  n = 8'd255;
    endcase
    k     = n - {3'b000, tsel, 1'b0} - 8'd2;  // n - 2(T+1)
    ctrl2 = (count < k);
  end

endmodule
