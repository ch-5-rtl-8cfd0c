// control: main decoder of the single-cycle datapath.
//
// From the opcode (bits 31-26) and, for opcode 0, the function field (bits
// 5-0) it produces every control signal of one instruction:
//
//   instr  op  fun  ALU    B    dest  D/IN   mem        next PC
//   ADD    0   20   ADD    Drt  rd    ALU    -          +4
//   SUB    0   22   SUB    Drt  rd    ALU    -          +4
//   OR     0   25   OR     Drt  rd    ALU    -          +4
//   SLT    0   2a   SLT    Drt  rd    ALU    -          +4
//   JR     0   08   -      -    -     -      -          Drs
//   JALR   0   09   -      -    rd    NPC+4  -          Drs
//   ADDI   08  -    ADD    imm  rt    ALU    -          +4
//   SLTI   0a  -    SLT    imm  rt    ALU    -          +4
//   LW     23  -    ADD    imm  rt    mem    word read  +4
//   LB     20  -    ADD    imm  rt    mem    byte read  +4
//   SW     2b  -    ADD    imm  -     -      word write +4
//   SB     28  -    ADD    imm  -     -      byte write +4
//   BEQ    04  -    SUB    Drt  -     -      -          branch if zero
//   BNE    05  -    SUB    Drt  -     -      -          branch if not zero
//   J      02  -    -      -    -     -      -          jump target
//   JAL    03  -    -      -    r31   NPC+4  -          jump target
//
// The opcode, function and ALU-operation columns follow the instruction
// table of the datapath description; the JALR function code 09 and the
// JAL opcode 03 come from its instruction-format drawings. Any other
// encoding decodes as a no-op (nothing written, next PC = +4), which is this
// design's choice. Combinational.
module control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);

  always_comb begin
    // default: no-op
    ctrl             = '0;
    ctrl.alu_op      = ALU_ADD;
    ctrl.dst_sel     = DST_RT;
    ctrl.wb_sel      = WB_ALU;
    ctrl.pc_sel      = PC_SEQ;

    unique case (op)
      OP_RTYPE: begin
        ctrl.dst_sel = DST_RD;
        unique case (funct)
          FN_ADD: begin ctrl.alu_op = ALU_ADD; ctrl.reg_write = 1'b1; end
          FN_SUB: begin ctrl.alu_op = ALU_SUB; ctrl.reg_write = 1'b1; end
          FN_OR:  begin ctrl.alu_op = ALU_OR;  ctrl.reg_write = 1'b1; end
          FN_SLT: begin ctrl.alu_op = ALU_SLT; ctrl.reg_write = 1'b1; end
          FN_JR:  begin ctrl.pc_sel = PC_REG; end
          FN_JALR: begin
            ctrl.pc_sel    = PC_REG;
            ctrl.wb_sel    = WB_LINK;
            ctrl.reg_write = 1'b1;
          end
          default: ;
        endcase
      end
      OP_ADDI: begin
        ctrl.alu_op = ALU_ADD; ctrl.alu_src_imm = 1'b1; ctrl.reg_write = 1'b1;
      end
      OP_SLTI: begin
        ctrl.alu_op = ALU_SLT; ctrl.alu_src_imm = 1'b1; ctrl.reg_write = 1'b1;
      end
      OP_LW, OP_LB: begin
        ctrl.alu_op      = ALU_ADD;
        ctrl.alu_src_imm = 1'b1;
        ctrl.wb_sel      = WB_MEM;
        ctrl.reg_write   = 1'b1;
        ctrl.mem_byte    = (op == OP_LB);
      end
      OP_SW, OP_SB: begin
        ctrl.alu_op      = ALU_ADD;
        ctrl.alu_src_imm = 1'b1;
        ctrl.mem_write   = 1'b1;
        ctrl.mem_byte    = (op == OP_SB);
      end
      OP_BEQ, OP_BNE: begin
        ctrl.alu_op = ALU_SUB;
        ctrl.pc_sel = PC_BRANCH;
        ctrl.br_ne  = (op == OP_BNE);
      end
      OP_J: begin
        ctrl.pc_sel = PC_JUMP;
      end
      OP_JAL: begin
        ctrl.pc_sel    = PC_JUMP;
        ctrl.dst_sel   = DST_R31;
        ctrl.wb_sel    = WB_LINK;
        ctrl.reg_write = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
