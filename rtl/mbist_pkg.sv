// mbist_pkg: constants and types shared by the low-power memory BIST.
//
// The BIST generates N-bit memory addresses with a clock-divided generator
// (an (N-2)-bit LFSR on a slow clock enable and a 2-bit modified LFSR on a
// fast one), writes Hamming(7,4)-encoded words produced from a 4-bit data
// LFSR, then reads them back through a random error unit and a Hamming
// decoder. N = 5 (32 locations), the 4-bit data and the 7-bit code word
// follow the source design; the controller phases are this design's own.
package mbist_pkg;

  // Address width N of the memory under test (2^N locations).
  localparam int unsigned ADDR_W = 5;
  // Data word produced by the data LFSR and its Hamming(7,4) code word.
  localparam int unsigned DATA_W = 4;
  localparam int unsigned PAR_W  = 3;
  localparam int unsigned CODE_W = DATA_W + PAR_W;

  // Number of distinct addresses the split generator visits for an address
  // width aw: the (aw-2)-bit LFSR has 2^(aw-2)-1 states, the 2-bit modified
  // LFSR has 4.
  function automatic int unsigned addr_gen_period(int unsigned aw);
    return ((32'd1 << (aw - 2)) - 1) * 4;
  endfunction

  // Phases of one BIST run.
  typedef enum logic [1:0] {
    PH_IDLE  = 2'd0,
    PH_WRITE = 2'd1,
    PH_READ  = 2'd2,
    PH_DONE  = 2'd3
  } bist_phase_e;

endpackage
