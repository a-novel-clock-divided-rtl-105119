// tb_clk_div_addr_gen: self-checking testbench of the clock-divided address
// generator at its default width (5 bits, 32 locations).
//
// A reference model in the testbench (upper 3-bit sequence 001, 010, 101,
// 011, 111, 110, 100 stepping once per four steps, lower pair 00, 10, 11,
// 01 stepping every step) predicts every address over two periods. Also
// checked: 28 distinct addresses per period, the slow clock enable fires
// exactly once per four fast enables and only on a step, the address holds
// without 'step', 'load' restarts at the first address, and the address
// register toggles fewer bits per period than a conventional 5-bit LFSR
// (x^5+x^3+1) clocked every step. A second, 6-bit instance must visit
// (2^4-1)*4 = 60 distinct addresses and then return to its first one.
module tb_clk_div_addr_gen;

  localparam int AW = 5;
  localparam int PERIOD = 28;

  logic clk = 1'b0;
  logic rst, step, load;
  logic [AW-1:0] addr;
  logic clk1_en, clk2_en;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clk_div_addr_gen dut (.clk(clk), .rst(rst), .step(step), .load(load),
                        .addr(addr), .clk1_en(clk1_en), .clk2_en(clk2_en));

  logic step6;
  logic [5:0] addr6;
  logic clk1_en6, clk2_en6;
  clk_div_addr_gen #(.ADDR_W(6)) dut6 (.clk(clk), .rst(rst), .step(step6), .load(1'b0),
                                       .addr(addr6), .clk1_en(clk1_en6), .clk2_en(clk2_en6));

  localparam logic [2:0] HI_SEQ [7] = '{3'b001, 3'b010, 3'b101, 3'b011, 3'b111, 3'b110, 3'b100};
  localparam logic [1:0] LO_SEQ [4] = '{2'b00, 2'b10, 2'b11, 2'b01};

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [AW-1:0] ref_addr(int k);
    k = k % PERIOD;
    return {HI_SEQ[k / 4], LO_SEQ[k % 4]};
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [32];
    int distinct, n_clk1, n_clk2, split_toggles, conv_toggles;
    logic [AW-1:0] prev, conv, conv_next;
    rst = 1; step = 0; load = 0; step6 = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    distinct = 0; n_clk1 = 0; n_clk2 = 0; split_toggles = 0;
    for (int k = 0; k < 2 * PERIOD; k++) begin
      check(addr == ref_addr(k), $sformatf("step %0d: addr=%b exp=%b", k, addr, ref_addr(k)));
      if (k < PERIOD) begin
        if (!seen[addr]) distinct++;
        seen[addr] = 1'b1;
      end
      step = 1;
      #1;
      check(clk2_en == 1'b1, "clk2_en follows step");
      check(clk1_en == (k % 4 == 3), $sformatf("step %0d: clk1_en=%b", k, clk1_en));
      if (clk1_en) n_clk1++;
      if (clk2_en) n_clk2++;
      prev = addr;
      @(negedge clk);
      if (k < PERIOD) split_toggles += $countones(addr ^ prev);
    end
    check(distinct == PERIOD, $sformatf("distinct addresses %0d, expected %0d", distinct, PERIOD));
    check(n_clk1 * 4 == n_clk2, $sformatf("clock ratio: clk1=%0d clk2=%0d", n_clk1, n_clk2));
    step = 0;
    #1;
    check(clk1_en == 1'b0 && clk2_en == 1'b0, "no enables without step");
    prev = addr;
    repeat (3) @(negedge clk);
    check(addr == prev, "hold without step");
    step = 1;
    repeat (5) @(negedge clk);
    step = 0; load = 1;
    @(negedge clk);
    load = 0;
    check(addr == ref_addr(0), "load restarts at the first address");

    // Conventional 5-bit LFSR over the same number of steps.
    conv = 5'b00001;
    conv_toggles = 0;
    for (int k = 0; k < PERIOD; k++) begin
      conv_next = {conv[3:0], conv[4] ^ conv[2]};
      conv_toggles += $countones(conv_next ^ conv);
      conv = conv_next;
    end
    $display("address bit toggles per %0d steps: split %0d, conventional %0d", PERIOD, split_toggles, conv_toggles);
    check(split_toggles < conv_toggles, "split generator toggles fewer address bits");

    // 6-bit instance: 60-address period.
    begin
      bit seen6 [64];
      logic [5:0] first6;
      int distinct6, n1;
      distinct6 = 0; n1 = 0;
      first6 = addr6;
      step6 = 1;
      for (int k = 0; k < 60; k++) begin
        if (!seen6[addr6]) distinct6++;
        seen6[addr6] = 1'b1;
        #1;
        if (clk1_en6) n1++;
        @(negedge clk);
      end
      step6 = 0;
      check(distinct6 == 60, $sformatf("6-bit: %0d distinct addresses, expected 60", distinct6));
      check(addr6 == first6, "6-bit: period 60");
      check(n1 == 15 && clk2_en6 == 1'b0, $sformatf("6-bit: %0d slow ticks, expected 15", n1));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
