// tb_lfsr_fib: self-checking testbench of the Fibonacci LFSR.
//
// The 4-bit instance (default parameters, x^4+x^3+1) is checked against a
// fixed table of its 15-state sequence, which contains the data words of
// the reference simulation (0011, 0110, 1101, 1010, 0101, 1011, 0111,
// 1111, 1110, 1100, 1000). A 3-bit instance (x^3+x^2+1), as used in the
// address generator, is checked for a period of exactly 7 with every
// non-zero state seen once. Also checked: the register holds while 'en'
// is low and 'load' restarts it at the seed.
module tb_lfsr_fib;

  logic clk = 1'b0;
  logic rst, en4, load4, en3, load3;
  logic [3:0] q4;
  logic [2:0] q3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr_fib dut4 (.clk(clk), .rst(rst), .en(en4), .load(load4), .q(q4));
  lfsr_fib #(.WIDTH(3), .TAPS(3'b010), .SEED(3'b001)) dut3
    (.clk(clk), .rst(rst), .en(en3), .load(load3), .q(q3));

  // Expected 4-bit sequence from seed 0001.
  localparam logic [3:0] SEQ4 [15] = '{
    4'b0001, 4'b0010, 4'b0100, 4'b1001, 4'b0011, 4'b0110, 4'b1101, 4'b1010,
    4'b0101, 4'b1011, 4'b0111, 4'b1111, 4'b1110, 4'b1100, 4'b1000
  };

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen3 [8];
    int n;
    rst = 1; en4 = 0; load4 = 0; en3 = 0; load3 = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    // Two full periods of the 4-bit register.
    for (int i = 0; i < 30; i++) begin
      check(q4 == SEQ4[i % 15], $sformatf("4-bit step %0d: q=%b exp=%b", i, q4, SEQ4[i % 15]));
      en4 = 1;
      @(negedge clk);
    end
    // Hold.
    en4 = 0;
    begin
      logic [3:0] held;
      held = q4;
      repeat (3) @(negedge clk);
      check(q4 == held, "4-bit hold with en=0");
    end
    // Load wins over enable.
    en4 = 1; load4 = 1;
    @(negedge clk);
    load4 = 0; en4 = 0;
    check(q4 == 4'b0001, $sformatf("4-bit load: q=%b", q4));

    // 3-bit register: period and coverage.
    en3 = 1;
    n = 0;
    for (int i = 0; i < 7; i++) begin
      check(q3 != 3'b000, "3-bit never zero");
      check(!seen3[q3], $sformatf("3-bit state %b repeats early", q3));
      seen3[q3] = 1'b1;
      @(negedge clk);
      n++;
    end
    check(q3 == 3'b001, $sformatf("3-bit period 7: back at seed, q=%b", q3));
    en3 = 0; load3 = 1;
    @(negedge clk);
    load3 = 0;
    check(q3 == 3'b001, "3-bit load");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
