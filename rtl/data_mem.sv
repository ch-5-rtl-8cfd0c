// data_mem: data memory of WORDS 32-bit words with byte write enables.
//
// A read always returns the whole 4-byte word that holds `addr` (bits 1-0
// are ignored), combinationally, so a load completes in the same cycle.
// Writes happen on the rising clock edge: each bit of `be` enables one byte
// lane (be[0] = bits 7-0), so a word store sets all four and a byte store
// one. Byte-lane selection for loads and stores is done outside, by
// load_align and store_align. The word-wide read, the byte-writable store
// and the default size are this design's reading of the datapath text.
module data_mem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [3:0]  be,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] idx;

  assign idx = AW'((addr >> 2) % WORDS);

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (be[i]) mem[idx][8*i +: 8] <= wdata[8*i +: 8];
    end
  end

  assign rdata = mem[idx];

endmodule
