// tb_hamming_encoder: self-checking testbench of the Hamming(7,4) encoder.
//
// The eleven data/code pairs of the reference simulation are checked
// exactly. For all 16 data words the code must carry the data in its upper
// four bits, and every pair of distinct code words must differ in at least
// three bits (the property that makes single-error correction possible).
module tb_hamming_encoder;

  logic [3:0] data;
  logic [6:0] code;
  logic [6:0] all_codes [16];
  int checks = 0, failures = 0;

  hamming_encoder dut (.data(data), .code(code));

  localparam logic [3:0] REF_D [11] = '{4'b0011, 4'b0110, 4'b1101, 4'b1010, 4'b0101, 4'b1011,
                                        4'b0111, 4'b1111, 4'b1110, 4'b1100, 4'b1000};
  localparam logic [6:0] REF_C [11] = '{7'b0011100, 7'b0110110, 7'b1101100, 7'b1010101,
                                        7'b0101010, 7'b1011010, 7'b0111001, 7'b1111111,
                                        7'b1110000, 7'b1100011, 7'b1000110};

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 11; i++) begin
      data = REF_D[i];
      #1;
      check(code == REF_C[i], $sformatf("data %b: code %b exp %b", data, code, REF_C[i]));
    end
    for (int d = 0; d < 16; d++) begin
      data = 4'(d);
      #1;
      all_codes[d] = code;
      check(code[6:3] == data, $sformatf("data %b carried in code %b", data, code));
    end
    for (int a = 0; a < 16; a++)
      for (int b = a + 1; b < 16; b++)
        check($countones(all_codes[a] ^ all_codes[b]) >= 3,
              $sformatf("distance of codes %0d and %0d below 3", a, b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
