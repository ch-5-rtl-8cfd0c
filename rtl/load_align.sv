// load_align: truncate logic between the data memory output and D/IN.
//
// The data memory always returns a whole word. For LW the word passes
// unchanged. For LB the byte addressed by bits 1-0 of the address is moved
// to bits 7-0 and bits 31-8 are filled with 24 zeros, so the loaded byte is
// zero-extended. Byte offset 0 is bits 7-0 of the word (little-endian lane
// order), which is the case where the plain truncation (keep bits 7-0, zero
// the rest) already works; the byte selection for offsets 1-3 is the
// alignment logic an arbitrary byte address needs. Combinational.
module load_align (
  input  logic [31:0] mem_word,
  input  logic [1:0]  byte_off,
  input  logic        load_byte,
  output logic [31:0] load_data
);

  logic [7:0] sel_byte;

  always_comb begin
    unique case (byte_off)
      2'd0: sel_byte = mem_word[7:0];
      2'd1: sel_byte = mem_word[15:8];
      2'd2: sel_byte = mem_word[23:16];
      2'd3: sel_byte = mem_word[31:24];
    endcase
    // upper 24 bits: zeros for a byte load, memory bits 31-8 for a word load
    load_data = load_byte ? {24'd0, sel_byte} : mem_word;
  end

endmodule
