// hamming_encoder: Hamming(7,4) encoder of the BIST data path.
//
// Appends three parity bits to the 4-bit data word before it is stored:
// code = {d3, d2, d1, d0, p2, p1, p0} with
//   p2 = d3 ^ d2 ^ d0,  p1 = d3 ^ d1 ^ d0,  p0 = d2 ^ d1 ^ d0.
// Every data bit is covered by at least two parity bits, each with a
// distinct pattern, so any single flipped bit of the stored word has a
// unique non-zero syndrome (see hamming_decoder). The bit layout and
// parity equations reproduce the code words of the source design
// (0011 -> 0011100, 1000 -> 1000110, 1111 -> 1111111).
//
// Interface: purely combinational, data in, code out. The code is
// systematic: code[6:3] is the data input wired straight through.
module hamming_encoder
  import mbist_pkg::*;
(
  input  logic [DATA_W-1:0] data,
  output logic [CODE_W-1:0] code
);

  logic [PAR_W-1:0] par;

  always_comb begin
    par[2] = data[3] ^ data[2] ^ data[0];
    par[1] = data[3] ^ data[1] ^ data[0];
    par[0] = data[2] ^ data[1] ^ data[0];
    code   = {data, par};
  end

endmodule
