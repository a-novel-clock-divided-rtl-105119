// ring_error_unit: random error unit of the memory under test.
//
// An 8-bit one-hot ring counter moves one position per memory read. Its low
// CODE_W (7) bits form the mask that is XORed into the word read from the
// memory, so seven consecutive reads each get a different bit flipped
// (bits 0..6) and the eighth read is left clean; the pattern then repeats.
// This models a stuck-at fault in the stored word that the Hamming decoder
// has to correct. Using a ring counter for the error follows the source
// design, as does the eight-position cycle with one clean position; the
// inject_en gate is this design's choice. The reset position START_POS = 6
// is chosen so that the first BIST run after reset flips the same bits as
// the reference simulation (data word 0011, the fifth of the run, gets bit
// 2 flipped).
//
// Interface: 'advance' moves the ring (once per read), 'inject_en' = 0
// forces a zero mask, 'rst' is synchronous and active high and puts the
// one-hot bit at position START_POS (0..7; 7 is the clean position). Timing: err_mask is combinational from the
// ring state and inject_en; the ring moves one clock after advance.
module ring_error_unit #(
  parameter int unsigned CODE_W    = 7,
  parameter int unsigned START_POS = 6
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              advance,
  input  logic              inject_en,
  output logic [CODE_W-1:0] err_mask
);

  localparam int unsigned RING_W = CODE_W + 1;

  logic [RING_W-1:0] ring;

  always_ff @(posedge clk) begin
    if (rst)          ring <= RING_W'(1) << START_POS;
    else if (advance) ring <= {ring[RING_W-2:0], ring[RING_W-1]};
  end

  assign err_mask = inject_en ? ring[CODE_W-1:0] : '0;

  // The ring must stay one-hot.
  initial assert (START_POS <= CODE_W) else $error("ring_error_unit: START_POS out of range");

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(ring));

endmodule
