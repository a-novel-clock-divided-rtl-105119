// tb_fig8_workload: replays the reference simulation of the BIST data path
// on the full design at its default parameters.
//
// The reference simulation shows eleven consecutive read cycles with the
// data word, its code word, the word read back with one injected error, the
// decoded word and the OK / err_exist flags. After reset, with injection
// on, the first run's read pass must reproduce these rows exactly at reads
// 4 to 14 (data words 0011 ... 1000): the flipped bit walks 2, 3, 4, 5, 6,
// none, 0, 1, 2, 3, 4, OK stays high, and err_exist is low only on the
// clean read (data 1011).
module tb_fig8_workload;

  logic clk = 1'b0;
  logic rst, start, inject_en;
  logic [4:0] addr;
  logic [3:0] lfsr_out, hamming_decode;
  logic [6:0] hamming_code, hamming_code_err;
  logic err_exist, ok, fail, done;
  logic [7:0] err_count;
  logic [2:0] syndrome;
  logic clk1_en, clk2_en;
  logic [1:0] phase;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mbist_top dut (
    .clk(clk), .rst(rst), .start(start), .inject_en(inject_en), .addr(addr),
    .lfsr_out(lfsr_out), .hamming_code(hamming_code), .hamming_code_err(hamming_code_err),
    .hamming_decode(hamming_decode), .err_exist(err_exist), .ok(ok), .fail(fail),
    .done(done), .err_count(err_count), .syndrome(syndrome), .clk1_en(clk1_en),
    .clk2_en(clk2_en), .phase(phase)
  );

  // Rows of the reference simulation: data, code, code read back, err_exist.
  localparam int ROWS = 11;
  localparam int FIRST = 4;
  localparam logic [3:0] R_DATA [ROWS] = '{4'b0011, 4'b0110, 4'b1101, 4'b1010, 4'b0101, 4'b1011,
                                           4'b0111, 4'b1111, 4'b1110, 4'b1100, 4'b1000};
  localparam logic [6:0] R_CODE [ROWS] = '{7'b0011100, 7'b0110110, 7'b1101100, 7'b1010101,
                                           7'b0101010, 7'b1011010, 7'b0111001, 7'b1111111,
                                           7'b1110000, 7'b1100011, 7'b1000110};
  localparam logic [6:0] R_ERR  [ROWS] = '{7'b0011000, 7'b0111110, 7'b1111100, 7'b1110101,
                                           7'b1101010, 7'b1011010, 7'b0111000, 7'b1111101,
                                           7'b1110100, 7'b1101011, 7'b1010110};
  localparam bit         R_EXIST [ROWS] = '{1, 1, 1, 1, 1, 0, 1, 1, 1, 1, 1};

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
    int k, matched;
    rst = 1; start = 0; inject_en = 1;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (phase != 2'd2) @(negedge clk);
    k = 0; matched = 0;
    while (phase == 2'd2) begin
      #1;
      if (k >= FIRST && k < FIRST + ROWS) begin
        int r;
        r = k - FIRST;
        check(lfsr_out == R_DATA[r], $sformatf("row %0d: LFSR_out %b exp %b", r, lfsr_out, R_DATA[r]));
        check(hamming_code == R_CODE[r], $sformatf("row %0d: hamming_code %b exp %b", r, hamming_code, R_CODE[r]));
        check(hamming_code_err == R_ERR[r],
              $sformatf("row %0d: hamming_code_err %b exp %b", r, hamming_code_err, R_ERR[r]));
        check(hamming_decode == R_DATA[r], $sformatf("row %0d: hamming_decode %b", r, hamming_decode));
        check(err_exist == R_EXIST[r], $sformatf("row %0d: err_exist %b", r, err_exist));
        check(ok, $sformatf("row %0d: OK low", r));
        matched++;
      end
      k++;
      @(negedge clk);
    end
    check(matched == ROWS, $sformatf("%0d of %0d rows seen", matched, ROWS));
    check(done && !fail, "run completes without failure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
