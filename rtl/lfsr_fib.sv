// lfsr_fib: Fibonacci (external-XOR) linear feedback shift register.
//
// Stages FF1..FFN are q[0]..q[WIDTH-1]. On every enabled clock the register
// shifts towards FFN and FF1 takes the XOR of the tapped stages, selected by
// the TAPS mask (bit i set = stage q[i] feeds the XOR; the last stage is
// always tapped). This is the conventional LFSR structure; in the BIST it
// serves as the (N-2)-bit upper address LFSR (taps x^3+x^2+1, this design's
// choice) and as the 4-bit data LFSR, whose taps x^4+x^3+1 reproduce the
// data sequence of the source design (0011, 0110, 1101, 1010, ...).
//
// Interface: 'en' is the (gated) clock enable, 'load' restarts the sequence
// at SEED and wins over 'en', 'rst' is synchronous and active high.
// Timing: q changes one clock after en or load; no combinational paths.
// WIDTH must be at least 2.
module lfsr_fib #(
  parameter int unsigned           WIDTH = 4,
  parameter logic [WIDTH-1:0]      TAPS  = 4'b1100,
  parameter logic [WIDTH-1:0]      SEED  = 4'b0001
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             load,
  output logic [WIDTH-1:0] q
);

  logic fb;

  // XOR of the tapped stages; the last stage is always part of the feedback.
  assign fb = ^(q & (TAPS | (WIDTH'(1) << (WIDTH - 1))));

  always_ff @(posedge clk) begin
    if (rst || load) begin
      q <= SEED;
    end else if (en) begin
      q <= {q[WIDTH-2:0], fb};
    end
  end

  // A non-zero seed is required: the all-zero state locks the register.
  initial assert (SEED != '0) else $error("lfsr_fib: SEED must be non-zero");

endmodule
