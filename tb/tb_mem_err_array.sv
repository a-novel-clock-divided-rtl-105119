// tb_mem_err_array: self-checking testbench of the memory under test with
// its random error unit (default size: 32 words of 7 bits).
//
// Fills every address with a random word (kept in a shadow array), reads
// all back with injection off and expects exact data, then reads all back
// with injection on and expects the stored word XOR the one-hot mask the
// ring should hold (ring position k+6 mod 8 flips that bit, position 7
// flips none). Finally checks that
// a read does not disturb the contents and that a write lands in the same
// cycle's address only.
module tb_mem_err_array;

  localparam int AW = 5;
  localparam int DEPTH = 1 << AW;

  logic clk = 1'b0;
  logic rst, we, re, inject_en;
  logic [AW-1:0] addr;
  logic [6:0] wdata, rdata;
  logic [6:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mem_err_array dut (.clk(clk), .rst(rst), .addr(addr), .we(we), .re(re), .inject_en(inject_en),
                     .wdata(wdata), .rdata(rdata));

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
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    rst = 1; we = 0; re = 0; inject_en = 0; addr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      shadow[a] = 7'($urandom);
      addr = AW'(a); wdata = shadow[a]; we = 1;
      @(negedge clk);
    end
    we = 0;
    k = 6;
    for (int a = DEPTH - 1; a >= 0; a--) begin
      addr = AW'(a); re = 1;
      #1;
      check(rdata == shadow[a], $sformatf("clean read %0d: %b exp %b", a, rdata, shadow[a]));
      @(negedge clk);
      k++;
    end
    inject_en = 1;
    for (int a = 0; a < DEPTH; a++) begin
      addr = AW'(a); re = 1;
      #1;
      check(rdata == (shadow[a] ^ exp_mask(k)),
            $sformatf("faulty read %0d: %b exp %b", a, rdata, shadow[a] ^ exp_mask(k)));
      @(negedge clk);
      k++;
    end
    re = 0; inject_en = 0;
    // One more write, then every word must still match the shadow.
    addr = 5'd9; wdata = ~shadow[9]; we = 1;
    shadow[9] = ~shadow[9];
    @(negedge clk);
    we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      addr = AW'(a);
      #1;
      check(rdata == shadow[a], $sformatf("after write read %0d: %b exp %b", a, rdata, shadow[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
