// mips_pkg: encodings and control types shared by the single-cycle MIPS subset.
//
// Opcode (bits 31-26) and function-field (bits 5-0) values are those of the
// instruction set the processor implements: ADD, SUB, OR, SLT, JR, JALR
// (R-format, opcode 0), ADDI, SLTI, LW, LB, SW, SB, BEQ, BNE (I-format) and
// J, JAL (J-format). The ALU operation set is ADD, SUB, SLT, AND, OR and the
// two bypasses; the enum encodings, the control bundle layout and the
// next-PC select encoding are this design's own choice.
package mips_pkg;

  // Opcodes, instruction bits 31-26
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_JAL   = 6'h03;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_SLTI  = 6'h0a;
  localparam logic [5:0] OP_LB    = 6'h20;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SB    = 6'h28;
  localparam logic [5:0] OP_SW    = 6'h2b;

  // Function field, instruction bits 5-0, for opcode 0
  localparam logic [5:0] FN_JR    = 6'h08;
  localparam logic [5:0] FN_JALR  = 6'h09;
  localparam logic [5:0] FN_ADD   = 6'h20;
  localparam logic [5:0] FN_SUB   = 6'h22;
  localparam logic [5:0] FN_OR    = 6'h25;
  localparam logic [5:0] FN_SLT   = 6'h2a;

  // Register the JAL instruction links into
  localparam logic [4:0] REG_RA   = 5'd31;

  typedef enum logic [2:0] {
    ALU_ADD   = 3'd0,
    ALU_SUB   = 3'd1,
    ALU_SLT   = 3'd2,
    ALU_AND   = 3'd3,
    ALU_OR    = 3'd4,
    ALU_PASSA = 3'd5,
    ALU_PASSB = 3'd6
  } alu_op_t;

  // Register-file write address select
  typedef enum logic [1:0] {
    DST_RT  = 2'd0,   // bits 20-16 (I-format results and loads)
    DST_RD  = 2'd1,   // bits 15-11 (R-format results, JALR)
    DST_R31 = 2'd2    // constant 31 (JAL)
  } dst_sel_t;

  // Register-file write data (D/IN) select
  typedef enum logic [1:0] {
    WB_ALU  = 2'd0,
    WB_MEM  = 2'd1,
    WB_LINK = 2'd2    // NPC + 4, i.e. PC + 8
  } wb_sel_t;

  // NPC input multiplexer select
  typedef enum logic [1:0] {
    PC_SEQ    = 2'd0, // NPC + 4
    PC_BRANCH = 2'd1, // branch target if the branch condition holds
    PC_JUMP   = 2'd2, // {PC[31:28], target, 00}
    PC_REG    = 2'd3  // Drs
  } pc_sel_t;

  typedef struct packed {
    alu_op_t  alu_op;
    logic     alu_src_imm;  // ALU operand B: 1 = sign-extended immediate, 0 = Drt
    dst_sel_t dst_sel;
    wb_sel_t  wb_sel;
    logic     reg_write;
    logic     mem_write;
    logic     mem_byte;     // byte access (LB, SB) rather than word
    pc_sel_t  pc_sel;
    logic     br_ne;        // with PC_BRANCH: branch on not-equal (BNE)
  } ctrl_t;

endpackage
