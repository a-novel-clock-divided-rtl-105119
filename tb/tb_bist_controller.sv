// tb_bist_controller: self-checking testbench of the BIST sequencer.
//
// Runs the controller at its default length (28 steps per pass) with a
// testbench model standing in for the data path. Checks per run: reseed in
// the start cycle and on the last write; exactly 28 writes then 28 reads,
// never both at once; 27 steps per pass; 'done' exactly 56 cycles after
// start; ok follows the comparison during reads; err_count counts reads
// with err_exist; fail stays low for a clean run and goes high after one
// mismatching read; a second start clears fail and err_count.
module tb_bist_controller;

  import mbist_pkg::*;

  localparam int STEPS = 28;

  logic clk = 1'b0;
  logic rst, start, err_exist;
  logic [3:0] expected, decoded;
  bist_phase_e phase;
  logic step, reseed, we, re, ok, fail, done;
  logic [7:0] err_count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bist_controller dut (.clk(clk), .rst(rst), .start(start), .expected(expected), .decoded(decoded),
                       .err_exist(err_exist), .phase(phase), .step(step), .reseed(reseed),
                       .we(we), .re(re), .ok(ok), .fail(fail), .done(done), .err_count(err_count));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One run. bad_read: index of a read that returns wrong data (-1: none).
  // Reads whose index is a multiple of 3 report err_exist.
  task automatic run(input int bad_read);
    int n_we, n_re, n_step, n_reseed, cycles, exp_err, rd;
    n_we = 0; n_re = 0; n_step = 0; n_reseed = 0; cycles = 0; exp_err = 0; rd = 0;
    start = 1;
    #1;
    check(reseed, "reseed in start cycle");
    @(negedge clk);
    start = 0;
    while (!done && cycles < 200) begin
      expected = 4'($urandom);
      decoded = (rd == bad_read && re) ? ~expected : expected;
      err_exist = re && (rd % 3 == 0);
      #1;
      check(!(we && re), "write and read at once");
      if (we) n_we++;
      if (re) begin
        check(ok == (decoded == expected), $sformatf("read %0d: ok=%b", rd, ok));
        if (err_exist) exp_err++;
        n_re++;
        rd++;
      end else begin
        check(ok, "ok high outside reads");
      end
      if (step) n_step++;
      if (reseed) begin
        n_reseed++;
        check(we && n_we == STEPS, "reseed only on the last write");
      end
      @(negedge clk);
      cycles++;
    end
    err_exist = 0;
    check(cycles == 2 * STEPS, $sformatf("run length %0d cycles, expected %0d", cycles, 2 * STEPS));
    check(n_we == STEPS && n_re == STEPS, $sformatf("writes %0d reads %0d", n_we, n_re));
    check(n_step == 2 * (STEPS - 1), $sformatf("steps %0d", n_step));
    check(n_reseed == 1, "one reseed between passes");
    check(err_count == 8'(exp_err), $sformatf("err_count %0d exp %0d", err_count, exp_err));
    check(fail == (bad_read >= 0), $sformatf("fail=%b", fail));
    check(phase == PH_DONE, "ends in DONE");
    repeat (3) @(negedge clk);
    check(done && !we && !re && !step, "DONE is quiet");
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0; expected = '0; decoded = '0; err_exist = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(phase == PH_IDLE && !done && !we && !re, "idle after reset");
    repeat (3) @(negedge clk);
    check(phase == PH_IDLE, "stays idle without start");
    run(-1);
    run(11);
    run(-1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
