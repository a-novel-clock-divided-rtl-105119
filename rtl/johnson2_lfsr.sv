// johnson2_lfsr: the 2-bit modified LFSR of the clock-divided address
// generator.
//
// Two flip-flops in a twisted ring: FF1 takes the inverse of Q2 and FF2
// takes Q1. From reset (00) the pair (Q1,Q2) walks 00 -> 10 -> 11 -> 01 ->
// 00, so, unlike a 2-bit XOR LFSR (3 states), it visits all four codes, and
// only one bit changes per step, which keeps address switching low. The
// structure follows the source design; the reset value and the 'last'
// flag are this design's choices.
//
// Interface: 'en' is the fast clock enable (clock 2), 'load' restarts at 00,
// 'rst' is synchronous and active high. 'last' is high in state 01, the
// final state of the cycle, and is used to derive the slow clock enable.
// Timing: q1/q2 change one clock after en; 'last' is combinational from the
// state.
module johnson2_lfsr (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic load,
  output logic q1,
  output logic q2,
  output logic last
);

  always_ff @(posedge clk) begin
    if (rst || load) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
    end else if (en) begin
      q1 <= ~q2;
      q2 <= q1;
    end
  end

  assign last = ~q1 & q2;

endmodule
