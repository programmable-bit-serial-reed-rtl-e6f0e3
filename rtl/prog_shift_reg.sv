// prog_shift_reg: programmable 4-, 5- or 8-bit serial shift register.
//
// Delays a bit-serial stream by one symbol, i.e. by m clocks, where m = 4, 5
// or 8 is set by the field select {m1, m0}. Eight flip-flops form three
// groups - three head stages, one middle stage and four tail stages - joined
// by two 2:1 multiplexers: the m1 multiplexer feeds the middle stage from the
// head stages (1) or straight from din (0), and the m0 multiplexer feeds the
// tail stages from the middle stage (1) or straight from din (0). Hence
// {m1,m0} = 11 uses all 8 stages, 01 the middle and tail stages (5), and 00
// the tail stages only (4). This arrangement is the one drawn for the
// encoder this design follows; reset to zero is this design's choice.
//
// Timing: dout at clock edge e equals din sampled m edges earlier. The
// register shifts on every clock.
module prog_shift_reg
  import rs_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,   // asynchronous, active low; clears all stages
  input  field_e field,   // {m1, m0}
  input  logic   din,
  output logic   dout
);

  logic [2:0] head;  // stages 1..3 (head[2] is the last of them)
  logic       mid;   // stage 4
  logic [3:0] tail;  // stages 5..8 (tail[3] drives dout)

  logic mid_in, tail_in;

  always_comb begin
    mid_in  = field[1] ? head[2] : din;  // m1 multiplexer
    tail_in = field[0] ? mid     : din;  // m0 multiplexer
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0;
      mid  <= 1'b0;
      tail <= '0;
    end else begin
      head <= {head[1:0], din};
      mid  <= mid_in;
      tail <= {tail[2:0], tail_in};
    end
  end

  assign dout = tail[3];

endmodule
