// instr_mem: instruction memory of WORDS 32-bit words.
//
// The processor reads it combinationally: `addr` is a byte address (the PC),
// and since every instruction is 4 bytes and word aligned, bits 1-0 are
// ignored and bits above them index the word array (wrapping modulo WORDS).
// A write port (`load_*`, clocked) lets a program be placed in memory before
// or while the processor is held in reset; the port is this design's own
// addition. The default size is this design's choice.
module instr_mem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] instr,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0] mem [WORDS];

  function automatic logic [AW-1:0] index(input logic [31:0] byte_addr);
    return AW'((byte_addr >> 2) % WORDS);
  endfunction

  always_ff @(posedge clk) begin
    if (load_we) mem[index(load_addr)] <= load_data;
  end

  assign instr = mem[index(addr)];

endmodule
