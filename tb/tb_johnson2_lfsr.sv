// tb_johnson2_lfsr: self-checking testbench of the 2-bit modified LFSR.
//
// Checks the cycle (Q1,Q2) = 00, 10, 11, 01 over three periods, that
// exactly one bit changes per step, that 'last' is high only in state 01,
// that the state holds while 'en' is low and that 'load' returns to 00.
module tb_johnson2_lfsr;

  logic clk = 1'b0;
  logic rst, en, load;
  logic q1, q2, last;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  johnson2_lfsr dut (.clk(clk), .rst(rst), .en(en), .load(load), .q1(q1), .q2(q2), .last(last));

  localparam logic [1:0] SEQ [4] = '{2'b00, 2'b10, 2'b11, 2'b01};

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] prev;
    rst = 1; en = 0; load = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    prev = {q1, q2};
    for (int i = 0; i < 12; i++) begin
      check({q1, q2} == SEQ[i % 4], $sformatf("step %0d: q1q2=%b%b exp=%b", i, q1, q2, SEQ[i % 4]));
      check(last == (SEQ[i % 4] == 2'b01), $sformatf("step %0d: last=%b", i, last));
      if (i > 0) check($countones({q1, q2} ^ prev) == 1, "one bit changes per step");
      prev = {q1, q2};
      en = 1;
      @(negedge clk);
    end
    en = 0;
    prev = {q1, q2};
    repeat (3) @(negedge clk);
    check({q1, q2} == prev, "hold with en=0");
    en = 1;
    @(negedge clk);
    en = 0; load = 1;
    @(negedge clk);
    load = 0;
    check({q1, q2} == 2'b00, "load returns to 00");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
