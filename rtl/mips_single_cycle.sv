// mips_single_cycle: single-cycle processor for a 16-instruction MIPS subset.
//
// Every clock cycle one instruction goes all the way through: the PC
// addresses the instruction memory; bits 25-21 (Rs) and 20-16 (Rt) address
// the register file; the ALU combines Drs with either Drt or the
// sign-extended immediate; the ALU result is the data-memory address for
// loads and stores; and on the rising edge the register file, the data
// memory and the NPC/PC registers are written together.
//
// Instructions: ADD SUB OR SLT JR JALR ADDI SLTI LW LB SW SB BEQ BNE J JAL.
// The register written is Rd (bits 15-11) for R-format, Rt (bits 20-16) for
// I-format and 31 for JAL, chosen by two cascaded multiplexers; D/IN is the
// ALU result, the truncated memory data or the return address NPC + 4.
// Branches and jumps load NPC, so the instruction after one (its delay slot)
// is always executed; JAL/JALR save PC + 8.
//
// Interface: clk, synchronous active-low rst_n, a program-load port into the
// instruction memory (use it while rst_n is low), and observation outputs
// for the current PC, NPC and instruction, the register write and the data-memory
// write of the cycle. All observation outputs are valid during the cycle and
// take effect at the next rising edge.
//
// The datapath structure follows the description it was built from; memory
// sizes, RESET_PC, the reset, the load port and the observation outputs are
// this design's own.
module mips_single_cycle
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        imem_load_we,
  input  logic [31:0] imem_load_addr,
  input  logic [31:0] imem_load_data,
  output logic [31:0] pc,
  output logic [31:0] npc,
  output logic [31:0] instr,
  output logic        rf_we,
  output logic [4:0]  rf_waddr,
  output logic [31:0] rf_wdata,
  output logic [3:0]  dmem_be,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata
);

  ctrl_t       ctrl;
  logic [31:0] link;
  logic [31:0] d_rs, d_rt;
  logic [31:0] imm32;
  logic [31:0] alu_b, alu_y;
  logic        alu_zero;
  logic [31:0] mem_word, load_data;
  logic [4:0]  dst_rt_rd;

  // ---------------- fetch and next PC ----------------
  pc_unit #(.RESET_PC(RESET_PC)) u_pc (
    .clk      (clk),
    .rst_n    (rst_n),
    .pc_sel   (ctrl.pc_sel),
    .br_ne    (ctrl.br_ne),
    .alu_zero (alu_zero),
    .imm32    (imm32),
    .jtarget  (instr[25:0]),
    .rs_data  (d_rs),
    .pc       (pc),
    .npc      (npc),
    .link     (link)
  );

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk       (clk),
    .addr      (pc),
    .instr     (instr),
    .load_we   (imem_load_we),
    .load_addr (imem_load_addr),
    .load_data (imem_load_data)
  );

  // ---------------- decode ----------------
  control u_ctrl (
    .op    (instr[31:26]),
    .funct (instr[5:0]),
    .ctrl  (ctrl)
  );

  sign_extend u_sext (
    .imm16 (instr[15:0]),
    .imm32 (imm32)
  );

  // write address: Rt or Rd, then that or 31
  assign dst_rt_rd = (ctrl.dst_sel == DST_RD) ? instr[15:11] : instr[20:16];
  assign rf_waddr  = (ctrl.dst_sel == DST_R31) ? REG_RA : dst_rt_rd;
  assign rf_we     = ctrl.reg_write && rst_n;

  regfile u_rf (
    .clk   (clk),
    .rst_n (rst_n),
    .ra_rs (instr[25:21]),
    .ra_rt (instr[20:16]),
    .d_rs  (d_rs),
    .d_rt  (d_rt),
    .we    (rf_we),
    .wa    (rf_waddr),
    .wd    (rf_wdata)
  );

  // ---------------- execute ----------------
  assign alu_b = ctrl.alu_src_imm ? imm32 : d_rt;

  alu u_alu (
    .op   (ctrl.alu_op),
    .a    (d_rs),
    .b    (alu_b),
    .y    (alu_y),
    .zero (alu_zero)
  );

  // ---------------- memory ----------------
  assign dmem_addr = alu_y;

  store_align u_st (
    .rt_data    (d_rt),
    .byte_off   (alu_y[1:0]),
    .store      (ctrl.mem_write && rst_n),
    .store_byte (ctrl.mem_byte),
    .wdata      (dmem_wdata),
    .be         (dmem_be)
  );

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk   (clk),
    .addr  (alu_y),
    .be    (dmem_be),
    .wdata (dmem_wdata),
    .rdata (mem_word)
  );

  load_align u_ld (
    .mem_word  (mem_word),
    .byte_off  (alu_y[1:0]),
    .load_byte (ctrl.mem_byte),
    .load_data (load_data)
  );

  // ---------------- write back (D/IN) ----------------
  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  rf_wdata = load_data;
      WB_LINK: rf_wdata = link;
      default: rf_wdata = alu_y;
    endcase
  end

endmodule
