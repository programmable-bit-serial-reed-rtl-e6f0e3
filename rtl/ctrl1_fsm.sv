// ctrl1_fsm: programmable FSM generating control1.
//
// control1 repeats the pattern 0...01 with m-1 zeros, m = 4, 5 or 8 from the
// field select {m1, m0}, so it is high on the last bit of every bit-serial
// symbol. It strobes the parallel load of the Berlekamp multiplier and
// advances the symbol counter. The FSM is a bit counter modulo m; bit_idx is
// the dual-basis position (0 first) of the bit in the current clock.
//
// Timing: after reset, or while en is low, the counter stays at 0. With en
// high, bit_idx steps 0, 1, ..., m-1, 0, ... one per clock and ctrl1 is high
// exactly when bit_idx = m-1 (combinational from the state). The FSM
// behaviour follows the encoder this design is based on; its encoding as a
// binary counter is this design's choice.
module ctrl1_fsm
  import rs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,   // asynchronous, active low
  input  logic       en,      // count when high
  input  field_e     field,   // {m1, m0}
  output logic [2:0] bit_idx, // position of the current bit in its symbol
  output logic       ctrl1    // high on the last bit of a symbol
);

  logic [2:0] last;

  always_comb begin
    case (field)
      FIELD_M4: last = 3'd3;
      FIELD_M5: last = 3'd4;
      default:  last = 3'd7;
    endcase
    ctrl1 = en && (bit_idx == last);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           bit_idx <= '0;
    else if (!en)         bit_idx <= '0;
    else if (bit_idx >= last) bit_idx <= '0;
    else                  bit_idx <= bit_idx + 3'd1;
  end

endmodule
