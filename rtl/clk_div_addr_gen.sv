// clk_div_addr_gen: clock-divided (split) LFSR address generator.
//
// An ADDR_W-bit address is split into an (ADDR_W-2)-bit LFSR and a 2-bit
// modified LFSR (johnson2_lfsr). The 2-bit part runs on the fast clock
// (clock 2, every step); the upper LFSR runs on the slow clock (clock 1),
// which ticks only on the step where the 2-bit part wraps, i.e. once every
// four steps. Most of the register therefore switches at a quarter of the
// rate of a conventional ADDR_W-bit LFSR, which is where the power saving
// comes from. The split and the two clocks follow the source design; the
// 1:4 clock ratio is this design's reading of it.
//
// The two clocks are realised as clock enables (clk1_en, clk2_en) of one
// BIST clock; a synthesis flow maps such enables to clock-gating cells. The
// address is {upper LFSR, Q1, Q2}: the slow LFSR forms the most significant
// bits, the 2-bit part the least significant ones.
//
// Because the upper LFSR never holds zero, one pass visits
// (2^(ADDR_W-2)-1)*4 distinct addresses (28 of 32 for ADDR_W = 5) and then
// repeats. Interface: 'step' advances one address, 'load' restarts at the
// first address ({SEED, 00}), 'rst' is synchronous and active high.
// Timing: addr changes one clock after step/load; clk1_en/clk2_en are
// combinational from step and the state (clk2_en is step itself: the fast
// clock runs on every step).
module clk_div_addr_gen #(
  parameter int unsigned ADDR_W = 5
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              step,
  input  logic              load,
  output logic [ADDR_W-1:0] addr,
  output logic              clk1_en,
  output logic              clk2_en
);

  localparam int unsigned HI_W = ADDR_W - 2;

  // Primitive feedback masks for the upper LFSR (last stage always tapped).
  function automatic logic [HI_W-1:0] hi_taps();
    case (HI_W)
      2:       return HI_W'(8'b0000_0001);  // x^2+x+1
      3:       return HI_W'(8'b0000_0010);  // x^3+x^2+1
      4:       return HI_W'(8'b0000_0100);  // x^4+x^3+1
      5:       return HI_W'(8'b0000_0100);  // x^5+x^3+1
      6:       return HI_W'(8'b0001_0000);  // x^6+x^5+1
      7:       return HI_W'(8'b0010_0000);  // x^7+x^6+1
      8:       return HI_W'(8'b0011_1000);  // x^8+x^6+x^5+x^4+1
      default: return HI_W'(1) << (HI_W - 2);  // not maximal in general: extend the table
    endcase
  endfunction

  logic [HI_W-1:0] hi_q;
  logic            lo_q1, lo_q2, lo_last;

  assign clk2_en = step;
  assign clk1_en = step & lo_last;

  lfsr_fib #(
    .WIDTH (HI_W),
    .TAPS  (hi_taps()),
    .SEED  (HI_W'(1))
  ) u_hi_lfsr (
    .clk  (clk),
    .rst  (rst),
    .en   (clk1_en),
    .load (load),
    .q    (hi_q)
  );

  johnson2_lfsr u_lo_lfsr (
    .clk  (clk),
    .rst  (rst),
    .en   (clk2_en),
    .load (load),
    .q1   (lo_q1),
    .q2   (lo_q2),
    .last (lo_last)
  );

  assign addr = {hi_q, lo_q1, lo_q2};

  initial assert (ADDR_W >= 4) else $error("clk_div_addr_gen: ADDR_W must be at least 4");

endmodule
