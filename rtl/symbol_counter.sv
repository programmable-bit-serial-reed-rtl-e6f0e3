// symbol_counter: the encoder's general counter of symbols within a codeword.
//
// Counts in binary once every m clocks (advancing on control1, the last bit
// of each symbol) from 0 up to n-1 = 2^m - 2 and then wraps to 0, so that
// codewords of n = 2^m - 1 symbols follow one another without gaps. m = 4, 5
// or 8 comes from the field select {m1, m0}. cw_last is high on the last
// clock of a codeword (last bit of symbol n-1).
//
// A counter that advances every m clocks and drives the control2 FSM follows
// the encoder this design is based on; wrapping at n-1 rather than at 2^m - 1
// is this design's choice, made so that one count cycle is one codeword.
// Reset, or en low, clears the count.
module symbol_counter
  import rs_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,   // asynchronous, active low
  input  logic            en,
  input  field_e          field,   // {m1, m0}
  input  logic            ctrl1,   // last bit of a symbol
  output logic [MMAX-1:0] count,   // symbol index within the codeword
  output logic            cw_last  // last clock of the codeword
);

  logic [MMAX-1:0] nlast;  // n - 1

  always_comb begin
    case (field)
      FIELD_M4: nlast = 8'd14;
      FIELD_M5: nlast = 8'd30;
      default:  nlast = 8'd254;
    endcase
    cw_last = ctrl1 && (count == nlast);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       count <= '0;
    else if (!en)     count <= '0;
    else if (cw_last) count <= '0;
    else if (ctrl1)   count <= count + 8'd1;
  end

  // The count never leaves 0..n-1.
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= nlast)
    else $error("symbol count %0d beyond n-1 = %0d", count, nlast);

endmodule
