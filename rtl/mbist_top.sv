// mbist_top: low-power memory BIST with a clock-divided address generator
// and Hamming-protected test data.
//
// Data path: the 4-bit data LFSR produces a test word, hamming_encoder
// turns it into a 7-bit code word, which is written into the memory under
// test (mem_err_array) at the address from the clock-divided address
// generator (clk_div_addr_gen). In the read pass the same address and data
// sequences are replayed; the stored word passes the random error unit
// (one bit flipped per read when inject_en is high), hamming_decoder
// corrects it, and bist_controller compares the result with the replayed
// data word. The data LFSR steps on the fast clock enable, one data word
// per address.
//
// Interface: 'start' begins a run, 'rst' is synchronous and active high.
// The observation ports carry the names of the source design's simulation
// (lfsr_out, hamming_code, hamming_code_err, hamming_decode, err_exist,
// ok) plus the address, the decoder syndrome, the two clock enables of the
// address generator (clk1_en slow, clk2_en fast), the controller phase
// (0 idle, 1 write, 2 read, 3 done), run status and the count of corrected
// errors.
// Timing: one run takes 2 * (2^(ADDR_W-2)-1) * 4 cycles (56 for ADDR_W = 5)
// from the cycle after start to done.
module mbist_top
  import mbist_pkg::*;
#(
  parameter int unsigned TOP_ADDR_W = ADDR_W
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic                  inject_en,
  output logic [TOP_ADDR_W-1:0] addr,
  output logic [DATA_W-1:0]     lfsr_out,
  output logic [CODE_W-1:0]     hamming_code,
  output logic [CODE_W-1:0]     hamming_code_err,
  output logic [DATA_W-1:0]     hamming_decode,
  output logic                  err_exist,
  output logic                  ok,
  output logic                  fail,
  output logic                  done,
  output logic [7:0]            err_count,
  output logic [PAR_W-1:0]      syndrome,
  output logic                  clk1_en,
  output logic                  clk2_en,
  output logic [1:0]            phase
);

  logic        step, reseed, we, re;
  bist_phase_e phase_e;

  assign phase = phase_e;

  clk_div_addr_gen #(.ADDR_W(TOP_ADDR_W)) u_addr_gen (
    .clk     (clk),
    .rst     (rst),
    .step    (step),
    .load    (reseed),
    .addr    (addr),
    .clk1_en (clk1_en),
    .clk2_en (clk2_en)
  );

  // Data LFSR, x^4+x^3+1, on the fast clock enable.
  lfsr_fib #(
    .WIDTH (DATA_W),
    .TAPS  (4'b1100),
    .SEED  (4'b0001)
  ) u_data_lfsr (
    .clk  (clk),
    .rst  (rst),
    .en   (clk2_en),
    .load (reseed),
    .q    (lfsr_out)
  );

  hamming_encoder u_enc (
    .data (lfsr_out),
    .code (hamming_code)
  );

  mem_err_array #(.ADDR_W(TOP_ADDR_W), .CODE_W(CODE_W)) u_mem (
    .clk       (clk),
    .rst       (rst),
    .addr      (addr),
    .we        (we),
    .re        (re),
    .inject_en (inject_en),
    .wdata     (hamming_code),
    .rdata     (hamming_code_err)
  );

  hamming_decoder u_dec (
    .code      (hamming_code_err),
    .data      (hamming_decode),
    .syndrome  (syndrome),
    .err_exist (err_exist)
  );

  bist_controller #(.STEPS(addr_gen_period(TOP_ADDR_W))) u_ctrl (
    .clk       (clk),
    .rst       (rst),
    .start     (start),
    .expected  (lfsr_out),
    .decoded   (hamming_decode),
    .err_exist (err_exist),
    .phase     (phase_e),
    .step      (step),
    .reseed    (reseed),
    .we        (we),
    .re        (re),
    .ok        (ok),
    .fail      (fail),
    .done      (done),
    .err_count (err_count)
  );

endmodule
