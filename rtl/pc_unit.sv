// pc_unit: next-PC logic with the NPC and PC registers.
//
// Two registers hold instruction addresses: PC, the address of the
// instruction executing now (it drives the instruction memory), and NPC, the
// address of the one after it. On every clock edge PC takes NPC and NPC takes
// the output of the NPC multiplexer, whose inputs are
//   - NPC + 4 (the "+1" incrementor: the registers keep only address bits
//     31-2, every instruction being 4 bytes and word aligned),
//   - the branch target NPC + 4*offset, chosen when pc_sel is PC_BRANCH and
//     the branch condition holds (alu_zero for BEQ, !alu_zero for BNE),
//   - the jump target {PC[31:28], target, 00},
//   - Drs, for JR and JALR.
// Because a branch or jump changes NPC, not PC, the instruction that follows
// it in memory (the delay slot) always executes before the target, and the
// return address saved by JAL/JALR is `link` = NPC + 4 = PC + 8.
// The NPC/PC structure, the incrementor, the jump-target formula and the
// link value follow the datapath description. The branch target relative to
// NPC (PC + 4), RESET_PC and the synchronous active-low reset (PC = RESET_PC,
// NPC = RESET_PC + 4) are this design's choices; bits 1-0 of a JR target
// are dropped. Bits 31-30 of imm32 are not read: the offset is added to the
// 30-bit word address, where they would fall off the top.
module pc_unit
  import mips_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  pc_sel_t     pc_sel,
  input  logic        br_ne,
  input  logic        alu_zero,
  input  logic [31:0] imm32,
  input  logic [25:0] jtarget,
  input  logic [31:0] rs_data,
  output logic [31:0] pc,
  output logic [31:0] npc,
  output logic [31:0] link
);

  logic [29:0] pc_q, npc_q;      // address bits 31-2
  logic [29:0] npc_inc;          // NPC + 1 word
  logic [29:0] br_target;
  logic [29:0] j_target;
  logic [29:0] npc_d;
  logic        br_taken;

  assign npc_inc   = npc_q + 30'd1;
  assign br_target = npc_q + imm32[29:0];
  assign j_target  = {pc_q[29:26], jtarget};
  assign br_taken  = br_ne ? !alu_zero : alu_zero;

  always_comb begin
    unique case (pc_sel)
      PC_SEQ:    npc_d = npc_inc;
      PC_BRANCH: npc_d = br_taken ? br_target : npc_inc;
      PC_JUMP:   npc_d = j_target;
      PC_REG:    npc_d = rs_data[31:2];
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc_q  <= RESET_PC[31:2];
      npc_q <= RESET_PC[31:2] + 30'd1;
    end else begin
      pc_q  <= npc_q;
      npc_q <= npc_d;
    end
  end

  assign pc   = {pc_q, 2'b00};
  assign npc  = {npc_q, 2'b00};
  assign link = {npc_inc, 2'b00};

endmodule
