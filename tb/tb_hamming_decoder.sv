// tb_hamming_decoder: self-checking testbench of the Hamming(7,4) decoder.
//
// Code words come from a table in the testbench (the parity equations
// p2 = d3^d2^d0, p1 = d3^d1^d0, p0 = d2^d1^d0, written out independently of
// the RTL). For every data word: the clean word decodes with err_exist low
// and syndrome 0; each of the seven single-bit errors decodes to the
// original data with err_exist high, and the seven syndromes are distinct;
// each of the 21 double-bit errors raises err_exist. The eleven corrupted
// words of the reference simulation are checked as well.
module tb_hamming_decoder;

  logic [6:0] code;
  logic [3:0] data;
  logic [2:0] syndrome;
  logic       err_exist;
  int checks = 0, failures = 0;

  hamming_decoder dut (.code(code), .data(data), .syndrome(syndrome), .err_exist(err_exist));

  localparam logic [3:0] REF_D [11] = '{4'b0011, 4'b0110, 4'b1101, 4'b1010, 4'b0101, 4'b1011,
                                        4'b0111, 4'b1111, 4'b1110, 4'b1100, 4'b1000};
  localparam logic [6:0] REF_E [11] = '{7'b0011000, 7'b0111110, 7'b1111100, 7'b1110101,
                                        7'b1101010, 7'b1011010, 7'b0111000, 7'b1111101,
                                        7'b1110100, 7'b1101011, 7'b1010110};
  localparam bit REF_ERR [11] = '{1, 1, 1, 1, 1, 0, 1, 1, 1, 1, 1};

  function automatic logic [6:0] enc(logic [3:0] d);
    return {d, d[3] ^ d[2] ^ d[0], d[3] ^ d[1] ^ d[0], d[2] ^ d[1] ^ d[0]};
  endfunction

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
    for (int d = 0; d < 16; d++) begin
      bit seen [8];
      seen = '{default: 1'b0};
      code = enc(4'(d));
      #1;
      check(data == 4'(d) && !err_exist && syndrome == 3'b000,
            $sformatf("clean %b: data %b err %b", code, data, err_exist));
      for (int b = 0; b < 7; b++) begin
        code = enc(4'(d)) ^ (7'b1 << b);
        #1;
        check(data == 4'(d), $sformatf("data %0d bit %0d: decoded %b", d, b, data));
        check(err_exist, $sformatf("data %0d bit %0d: err_exist low", d, b));
        check(!seen[syndrome], $sformatf("data %0d bit %0d: syndrome %b repeats", d, b, syndrome));
        seen[syndrome] = 1'b1;
      end
      for (int b1 = 0; b1 < 7; b1++)
        for (int b2 = b1 + 1; b2 < 7; b2++) begin
          code = enc(4'(d)) ^ (7'b1 << b1) ^ (7'b1 << b2);
          #1;
          check(err_exist, $sformatf("double error %0d,%0d not flagged", b1, b2));
        end
    end
    for (int i = 0; i < 11; i++) begin
      code = REF_E[i];
      #1;
      check(data == REF_D[i], $sformatf("reference word %b: decoded %b exp %b", code, data, REF_D[i]));
      check(err_exist == REF_ERR[i], $sformatf("reference word %b: err_exist %b", code, err_exist));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
