// tb_mbist_top: end-to-end testbench of the memory BIST at its default
// parameters (5-bit address, 32 x 7-bit memory, 4-bit data).
//
// A reference model in the testbench predicts, cycle by cycle, the address
// (upper 3-bit LFSR stepping once per four steps, lower 2-bit twisted ring
// 00, 10, 11, 01), the data word (x^4+x^3+1 sequence from 0001), its
// Hamming code, and the error mask of the ring error unit (one bit per
// read, positions 0..6 then a clean read). Four runs:
//   1. injection off: every read clean, no errors, run passes;
//   2. injection on: the stored words come back with one flipped bit, each
//      is corrected, err_count matches the model, run passes;
//   3. injection off, one stored word given a stuck bit between the passes:
//      the decoder corrects it, err_count is 1, run passes;
//   4. injection off, one stored word given two flipped bits: the word is
//      miscorrected, ok drops on that read and the run fails.
// Each mechanism (slow and fast clock ticks, writes, reads, reseeds,
// injected and corrected errors, clean reads, a stuck bit corrected, an
// uncorrectable word caught, run completion) is counted, and one that never
// happened counts as a failure. The run length (56 cycles) is checked.
module tb_mbist_top;

  localparam int AW = 5;
  localparam int STEPS = 28;

  logic clk = 1'b0;
  logic rst, start, inject_en;
  logic [AW-1:0] addr;
  logic [3:0] lfsr_out, hamming_decode;
  logic [6:0] hamming_code, hamming_code_err;
  logic err_exist, ok, fail, done;
  logic [7:0] err_count;
  logic [2:0] syndrome;
  logic clk1_en, clk2_en;
  logic [1:0] phase;
  int checks = 0, failures = 0;
  int ring_pos;  // model of the error ring position

  // Mechanism counters.
  int n_clk1, n_clk2, n_write, n_read, n_reseed, n_inj_corr, n_clean, n_stuck_corr, n_uncorr, n_done;

  always #5 clk = ~clk;

  mbist_top dut (
    .clk(clk), .rst(rst), .start(start), .inject_en(inject_en), .addr(addr),
    .lfsr_out(lfsr_out), .hamming_code(hamming_code), .hamming_code_err(hamming_code_err),
    .hamming_decode(hamming_decode), .err_exist(err_exist), .ok(ok), .fail(fail),
    .done(done), .err_count(err_count), .syndrome(syndrome), .clk1_en(clk1_en),
    .clk2_en(clk2_en), .phase(phase)
  );

  localparam logic [2:0] HI_SEQ [7] = '{3'b001, 3'b010, 3'b101, 3'b011, 3'b111, 3'b110, 3'b100};
  localparam logic [1:0] LO_SEQ [4] = '{2'b00, 2'b10, 2'b11, 2'b01};
  localparam logic [3:0] DATA_SEQ [15] = '{
    4'b0001, 4'b0010, 4'b0100, 4'b1001, 4'b0011, 4'b0110, 4'b1101, 4'b1010,
    4'b0101, 4'b1011, 4'b0111, 4'b1111, 4'b1110, 4'b1100, 4'b1000
  };

  function automatic logic [AW-1:0] ref_addr(int k);
    return {HI_SEQ[(k % STEPS) / 4], LO_SEQ[k % 4]};
  endfunction

  function automatic logic [6:0] enc(logic [3:0] d);
    return {d, d[3] ^ d[2] ^ d[0], d[3] ^ d[1] ^ d[0], d[2] ^ d[1] ^ d[0]};
  endfunction

  function automatic logic [6:0] ring_mask(int pos);
    return (pos % 8 == 7) ? 7'b0 : 7'(1 << (pos % 8));
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One BIST run. corrupt_k: read index whose stored word is XORed with
  // corrupt_mask after the write pass (-1: none).
  task automatic run(input bit inj, input int corrupt_k, input logic [6:0] corrupt_mask);
    int cycles, k, exp_err, nmask;
    bit exp_fail;
    logic [6:0] mask, stored;
    inject_en = inj;
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0; exp_err = 0; exp_fail = 0;
    // Write pass.
    for (k = 0; k < STEPS; k++) begin
      #1;
      check(phase == 2'd1, $sformatf("write %0d: phase %0d", k, phase));
      check(addr == ref_addr(k), $sformatf("write %0d: addr %b exp %b", k, addr, ref_addr(k)));
      check(lfsr_out == DATA_SEQ[k % 15], $sformatf("write %0d: data %b exp %b", k, lfsr_out, DATA_SEQ[k % 15]));
      check(hamming_code == enc(lfsr_out), $sformatf("write %0d: code %b", k, hamming_code));
      check(ok, "ok high during writes");
      n_write++;
      if (clk1_en) n_clk1++;
      if (clk2_en) n_clk2++;
      if (k == STEPS - 1) n_reseed++;
      @(negedge clk);
      cycles++;
    end
    // Stuck bits planted between the passes.
    if (corrupt_k >= 0)
      dut.u_mem.mem[ref_addr(corrupt_k)] = dut.u_mem.mem[ref_addr(corrupt_k)] ^ corrupt_mask;
    // Read pass.
    for (k = 0; k < STEPS; k++) begin
      #1;
      mask = inj ? ring_mask(ring_pos) : 7'b0;
      stored = enc(DATA_SEQ[k % 15]) ^ ((k == corrupt_k) ? corrupt_mask : 7'b0);
      nmask = $countones(mask ^ stored ^ enc(DATA_SEQ[k % 15]));
      check(phase == 2'd2, $sformatf("read %0d: phase %0d", k, phase));
      check(addr == ref_addr(k), $sformatf("read %0d: addr %b exp %b", k, addr, ref_addr(k)));
      check(lfsr_out == DATA_SEQ[k % 15], $sformatf("read %0d: data %b", k, lfsr_out));
      check(hamming_code_err == (stored ^ mask),
            $sformatf("read %0d: code_err %b exp %b", k, hamming_code_err, stored ^ mask));
      check(err_exist == (nmask != 0), $sformatf("read %0d: err_exist %b", k, err_exist));
      if (nmask != 0) exp_err++;
      if (nmask <= 1) begin
        check(hamming_decode == DATA_SEQ[k % 15], $sformatf("read %0d: decoded %b", k, hamming_decode));
        check(ok, $sformatf("read %0d: ok low", k));
        if (nmask == 0) n_clean++;
        else if (k == corrupt_k) n_stuck_corr++;
        else n_inj_corr++;
      end else begin
        check(!ok, $sformatf("read %0d: double error not caught", k));
        if (!ok) n_uncorr++;
        exp_fail = 1;
      end
      n_read++;
      if (clk1_en) n_clk1++;
      if (clk2_en) n_clk2++;
      ring_pos++;
      @(negedge clk);
      cycles++;
    end
    #1;
    check(done, $sformatf("done after %0d cycles", cycles));
    check(cycles == 2 * STEPS, "run length");
    check(fail == exp_fail, $sformatf("fail %b exp %b", fail, exp_fail));
    check(err_count == 8'(exp_err), $sformatf("err_count %0d exp %0d", err_count, exp_err));
    if (done) n_done++;
    repeat (2) @(negedge clk);
    check(done && phase == 2'd3, "stays done");
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_clk1 = 0; n_clk2 = 0; n_write = 0; n_read = 0; n_reseed = 0;
    n_inj_corr = 0; n_clean = 0; n_stuck_corr = 0; n_uncorr = 0; n_done = 0;
    ring_pos = 6;  // reset position of the error ring
    rst = 1; start = 0; inject_en = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(phase == 2'd0 && !done, "idle after reset");

    run(0, -1, 7'b0);
    run(1, -1, 7'b0);
    run(0, 9, 7'b0010000);
    run(0, 17, 7'b0100001);

    $display("mechanisms: clk1 %0d clk2 %0d writes %0d reads %0d reseeds %0d injected+corrected %0d clean %0d stuck+corrected %0d uncorrectable %0d runs %0d",
             n_clk1, n_clk2, n_write, n_read, n_reseed, n_inj_corr, n_clean, n_stuck_corr, n_uncorr, n_done);
    check(n_clk1 > 0, "slow clock ticked");
    // Per pass 27 steps (the 28th cycle reseeds): 6 slow ticks, 27 fast.
    check(n_clk2 == 4 * n_clk1 + 3 * 8, "clock ratio 1:4 per pass");
    check(n_write > 0 && n_read > 0, "writes and reads");
    check(n_reseed > 0, "reseed between passes");
    check(n_inj_corr > 0, "injected error corrected");
    check(n_clean > 0, "clean read");
    check(n_stuck_corr > 0, "stuck bit corrected");
    check(n_uncorr > 0, "uncorrectable word caught");
    check(n_done == 4, "four runs completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
