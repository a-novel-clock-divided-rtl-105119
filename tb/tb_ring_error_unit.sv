// tb_ring_error_unit: self-checking testbench of the random error unit.
//
// After reset the mask must start at 1000000 (position 6), then run
// 0000000, 0000001, 0000010, ..., 1000000
// and so on, one position per 'advance' (three full cycles checked),
// hold while 'advance' is low, and be zero whenever inject_en is low while
// the ring keeps moving.
module tb_ring_error_unit;

  logic clk = 1'b0;
  logic rst, advance, inject_en;
  logic [6:0] err_mask;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ring_error_unit dut (.clk(clk), .rst(rst), .advance(advance), .inject_en(inject_en), .err_mask(err_mask));

  function automatic logic [6:0] exp_mask(int k);
    k = k % 8;
    return (k == 7) ? 7'b0 : 7'(1 << k);
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (300) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    rst = 1; advance = 0; inject_en = 1;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    k = 6;
    for (int i = 0; i < 24; i++) begin
      check(err_mask == exp_mask(k), $sformatf("read %0d: mask %b exp %b", i, err_mask, exp_mask(k)));
      advance = 1;
      @(negedge clk);
      k++;
    end
    advance = 0;
    repeat (3) @(negedge clk);
    check(err_mask == exp_mask(k), "hold without advance");
    inject_en = 0;
    for (int i = 0; i < 8; i++) begin
      #1;
      check(err_mask == 7'b0, "no mask with inject_en low");
      advance = 1;
      @(negedge clk);
      k++;
    end
    advance = 0;
    inject_en = 1;
    #1;
    check(err_mask == exp_mask(k), "ring kept moving while injection was off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
