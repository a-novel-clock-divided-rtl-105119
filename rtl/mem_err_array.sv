// mem_err_array: memory under test with the random error unit on its
// read path.
//
// A 2^ADDR_W x CODE_W array (32 words of 7 bits by default) holds the
// Hamming-encoded test words. Writes are synchronous ('we' at the rising
// clock edge); reads are combinational, so the word at 'addr' appears in
// the same cycle. The read word is XORed with the mask of a ring_error_unit
// that advances on every read ('re'), flipping one bit per read to model a
// stuck-at fault. The array contents are not reset, as in an SRAM. The
// memory size follows the source design (N = 5, 32 locations, 7-bit words);
// the read timing is this design's choice.
//
// Interface: addr, we/wdata for writing; re, rdata for reading; inject_en
// turns the error unit on. 'rst' resets only the error ring.
module mem_err_array #(
  parameter int unsigned ADDR_W = 5,
  parameter int unsigned CODE_W = 7
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic              re,
  input  logic              inject_en,
  input  logic [CODE_W-1:0] wdata,
  output logic [CODE_W-1:0] rdata
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [CODE_W-1:0] mem [DEPTH];
  logic [CODE_W-1:0] err_mask;

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  ring_error_unit #(.CODE_W(CODE_W)) u_err (
    .clk       (clk),
    .rst       (rst),
    .advance   (re),
    .inject_en (inject_en),
    .err_mask  (err_mask)
  );

  assign rdata = mem[addr] ^ err_mask;

  a_no_rw: assert property (@(posedge clk) disable iff (rst) !(we && re));

endmodule
