// sign_extend: widens the 16-bit immediate field (instruction bits 15-0) to
// 32 bits. Bits 15-0 pass straight through; bit 15 selects whether bits
// 31-16 are sixteen zeros or sixteen ones, which is the two's-complement sign
// extension used by ADDI, SLTI, the load/store offsets and the branch offset.
// Purely combinational.
module sign_extend (
  input  logic [15:0] imm16,
  output logic [31:0] imm32
);

  logic [15:0] upper;

  always_comb begin
    upper = imm16[15] ? 16'hffff : 16'h0000;
    imm32 = {upper, imm16};
  end

endmodule
