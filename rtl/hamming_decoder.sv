// hamming_decoder: Hamming(7,4) error detection and correction.
//
// Recomputes the three parity bits from the received data bits and XORs
// them with the received parity to form the syndrome. A zero syndrome
// means no error. A non-zero syndrome names the flipped bit by its column
// of the parity-check matrix (d3=110, d2=101, d1=011, d0=111, p2=100,
// p1=010, p0=001, matching hamming_encoder); a flipped data bit is
// inverted back, a flipped parity bit needs no repair. The parity is then
// stripped and the 4-bit data word returned. Two flipped bits give a
// non-zero syndrome too but are miscorrected; the BIST controller catches
// that by comparing with the expected data.
//
// Interface: purely combinational. err_exist is high when the syndrome is
// non-zero (the word held an error, corrected if it was a single one).
module hamming_decoder
  import mbist_pkg::*;
(
  input  logic [CODE_W-1:0] code,
  output logic [DATA_W-1:0] data,
  output logic [PAR_W-1:0]  syndrome,
  output logic              err_exist
);

  logic [DATA_W-1:0] d;
  logic [PAR_W-1:0]  p;
  logic [DATA_W-1:0] flip;

  always_comb begin
    d = code[CODE_W-1:PAR_W];
    p = code[PAR_W-1:0];
    syndrome[2] = p[2] ^ d[3] ^ d[2] ^ d[0];
    syndrome[1] = p[1] ^ d[3] ^ d[1] ^ d[0];
    syndrome[0] = p[0] ^ d[2] ^ d[1] ^ d[0];
    flip = '0;
    unique case (syndrome)
      3'b110:  flip[3] = 1'b1;
      3'b101:  flip[2] = 1'b1;
      3'b011:  flip[1] = 1'b1;
      3'b111:  flip[0] = 1'b1;
      default: flip = '0;           // no error, or a parity bit flipped
    endcase
    data      = d ^ flip;
    err_exist = |syndrome;
  end

endmodule
