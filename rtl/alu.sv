// alu: 32-bit arithmetic/logic unit of the single-cycle datapath.
//
// Operations: ADD, SUB, SLT (signed a < b gives 1, else 0), AND, OR, and
// two bypasses that pass operand A or operand B unchanged. The operation set
// follows the datapath description; the encoding of `op` is mips_pkg's.
// `zero` is high when the result is all zeros; with SUB it is the equality
// test used by BEQ/BNE. Overflow is ignored: no exception logic exists.
// Purely combinational.
module alu
  import mips_pkg::*;
(
  input  alu_op_t     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output logic        zero
);

  logic [31:0] diff;

  always_comb begin
    diff = a - b;
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = diff;
      // signed compare from the subtraction: sign of the difference,
      // corrected when the operands have different signs
      ALU_SLT:   y = {31'd0, (a[31] != b[31]) ? a[31] : diff[31]};
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_PASSA: y = a;
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end

  assign zero = (y == '0);

endmodule
