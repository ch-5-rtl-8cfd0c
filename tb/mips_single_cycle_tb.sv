// mips_single_cycle_tb: end-to-end test of the single-cycle processor at its
// default sizes (1024-word instruction and data memories).
//
// A reference model written here (an instruction-set simulator with PC, NPC,
// 32 registers and a byte-addressed data memory, the instruction after a
// branch or jump always executing) runs in lockstep with the processor.
// Every cycle the testbench compares PC, the fetched instruction, the
// register write (enable, address, data) and the data-memory write (byte
// enables, word address, enabled bytes). One instruction must complete per
// clock: the PC is checked on every cycle.
//
// Phase 1 runs a directed program: a loop that clears the whole data memory
// with SW, then arithmetic, logic, compare, load/store (word and byte, every
// byte lane), taken and untaken BEQ/BNE, J, JAL, JR and JALR, with the final
// register values checked against hand-computed numbers taken from the
// register writes the processor performs.
// Phase 2, repeated EPISODES times, fills the instruction memory with random
// instructions (mostly of the implemented set, some arbitrary words), resets
// the processor and runs it for RAND_CYCLES cycles.
// Each mechanism (every instruction, taken and untaken branches of both
// kinds, byte loads and stores on each of the four lanes, writes to register
// 0) is counted; one that never happened counts as a failure.
module mips_single_cycle_tb;
  import mips_pkg::*;

  localparam int unsigned IW          = 1024;  // the processor's default sizes
  localparam int unsigned DW          = 1024;
  localparam int          EPISODES    = 24;    // random programs
  localparam int          RAND_CYCLES = 1500;  // cycles run per program

  logic        clk = 0, rst_n = 0;
  logic        imem_load_we;
  logic [31:0] imem_load_addr, imem_load_data;
  logic [31:0] pc, npc, instr;
  logic        rf_we;
  logic [4:0]  rf_waddr;
  logic [31:0] rf_wdata;
  logic [3:0]  dmem_be;
  logic [31:0] dmem_addr, dmem_wdata;

  mips_single_cycle dut (
    .clk(clk), .rst_n(rst_n),
    .imem_load_we(imem_load_we), .imem_load_addr(imem_load_addr),
    .imem_load_data(imem_load_data),
    .pc(pc), .npc(npc), .instr(instr),
    .rf_we(rf_we), .rf_waddr(rf_waddr), .rf_wdata(rf_wdata),
    .dmem_be(dmem_be), .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- instruction encoders ----------------
  function automatic logic [31:0] enc_r(int rs, int rt, int rd, logic [5:0] fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] enc_i(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] enc_j(logic [5:0] op, logic [31:0] target);
    return {op, target[27:2]};
  endfunction
  localparam logic [31:0] NOP = 32'h0000_0020;  // add r0, r0, r0

  // ---------------- program image ----------------
  logic [31:0] prog [IW];
  int          ppos;

  function automatic int emit(logic [31:0] w);
    prog[ppos] = w;
    ppos++;
    return (ppos - 1) * 4;
  endfunction

  task automatic load_program();
    imem_load_we = 1;
    for (int w = 0; w < IW; w++) begin
      imem_load_addr = 32'(w) * 4;
      imem_load_data = prog[w];
      @(negedge clk);
    end
    imem_load_we = 0;
  endtask

  // ---------------- reference model ----------------
  logic [31:0] m_pc, m_npc;
  logic [31:0] m_r   [32];
  logic [7:0]  m_mem [DW*4];
  logic [31:0] obs_r [32];   // register values as written by the processor

  // mechanism counters
  typedef enum int {
    K_ADD, K_SUB, K_OR, K_SLT, K_JR, K_JALR, K_ADDI, K_SLTI, K_LW, K_LB,
    K_SW, K_SB, K_BEQ_T, K_BEQ_N, K_BNE_T, K_BNE_N, K_J, K_JAL,
    K_LB0, K_LB1, K_LB2, K_LB3, K_SB0, K_SB1, K_SB2, K_SB3, K_R0W, K_NOPX,
    K_COUNT
  } kind_e;
  int cov [K_COUNT];

  function automatic int bidx(logic [31:0] a);
    return int'(a % (DW * 4));
  endfunction

  // Compare the processor's outputs for the current cycle with the model and
  // then advance the model by one instruction.
  task automatic step_and_check();
    logic [31:0] ins, rs_v, rt_v, imm, addr, wd, nxt, word;
    logic [5:0]  op, fn;
    logic [4:0]  rs, rt, rd;
    logic        e_we;
    logic [4:0]  e_wa;
    logic [3:0]  e_be;
    bit          ok;

    #1;  // let the combinational outputs settle
    ins  = prog[(m_pc >> 2) % IW];
    op   = ins[31:26]; fn = ins[5:0];
    rs   = ins[25:21]; rt = ins[20:16]; rd = ins[15:11];
    rs_v = m_r[rs];    rt_v = m_r[rt];
    imm  = {{16{ins[15]}}, ins[15:0]};
    nxt  = m_npc + 4;
    e_we = 0; e_wa = 0; wd = 0; e_be = 0; addr = 0;

    case (op)
      6'h00: case (fn)
        6'h20: begin e_we = 1; e_wa = rd; wd = rs_v + rt_v; cov[K_ADD]++; end
        6'h22: begin e_we = 1; e_wa = rd; wd = rs_v - rt_v; cov[K_SUB]++; end
        6'h25: begin e_we = 1; e_wa = rd; wd = rs_v | rt_v; cov[K_OR]++;  end
        6'h2a: begin e_we = 1; e_wa = rd; wd = {31'd0, $signed(rs_v) < $signed(rt_v)}; cov[K_SLT]++; end
        6'h08: begin nxt = rs_v & ~32'd3; cov[K_JR]++; end
        6'h09: begin e_we = 1; e_wa = rd; wd = m_npc + 4; nxt = rs_v & ~32'd3; cov[K_JALR]++; end
        default: cov[K_NOPX]++;
      endcase
      6'h08: begin e_we = 1; e_wa = rt; wd = rs_v + imm; cov[K_ADDI]++; end
      6'h0a: begin e_we = 1; e_wa = rt; wd = {31'd0, $signed(rs_v) < $signed(imm)}; cov[K_SLTI]++; end
      6'h23: begin
        addr = rs_v + imm;
        e_we = 1; e_wa = rt;
        for (int l = 0; l < 4; l++) wd[8*l +: 8] = m_mem[bidx({addr[31:2], 2'(l)})];
        cov[K_LW]++;
      end
      6'h20: begin
        addr = rs_v + imm;
        e_we = 1; e_wa = rt; wd = {24'd0, m_mem[bidx(addr)]};
        cov[K_LB]++; cov[K_LB0 + int'(addr[1:0])]++;
      end
      6'h2b: begin addr = rs_v + imm; e_be = 4'hf; cov[K_SW]++; end
      6'h28: begin
        addr = rs_v + imm; e_be = 4'(1 << addr[1:0]);
        cov[K_SB]++; cov[K_SB0 + int'(addr[1:0])]++;
      end
      6'h04: if (rs_v == rt_v) begin nxt = m_npc + (imm << 2); cov[K_BEQ_T]++; end
             else cov[K_BEQ_N]++;
      6'h05: if (rs_v != rt_v) begin nxt = m_npc + (imm << 2); cov[K_BNE_T]++; end
             else cov[K_BNE_N]++;
      6'h02: begin nxt = {m_pc[31:28], ins[25:0], 2'b00}; cov[K_J]++; end
      6'h03: begin
        e_we = 1; e_wa = 5'd31; wd = m_npc + 4; nxt = {m_pc[31:28], ins[25:0], 2'b00};
        cov[K_JAL]++;
      end
      default: cov[K_NOPX]++;
    endcase
    if (e_we && e_wa == 0) cov[K_R0W]++;

    // compare
    ok = 1;
    if (pc !== m_pc || instr !== ins || npc !== m_npc) ok = 0;
    if (rf_we !== e_we) ok = 0;
    if (e_we && (rf_waddr !== e_wa || rf_wdata !== wd)) ok = 0;
    if (dmem_be !== e_be) ok = 0;
    if (e_be != 0 && (dmem_addr[31:2] % DW) != (addr[31:2] % DW)) ok = 0;
    for (int l = 0; l < 4; l++) begin
      if (e_be[l]) begin
        word[8*l +: 8] = (op == 6'h28) ? rt_v[7:0] : rt_v[8*l +: 8];
        if (dmem_wdata[8*l +: 8] !== word[8*l +: 8]) ok = 0;
      end
    end
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL pc=%h/%h ins=%h/%h we=%b/%b wa=%0d/%0d wd=%h/%h be=%b/%b a=%h/%h",
                 pc, m_pc, instr, ins, rf_we, e_we, rf_waddr, e_wa, rf_wdata, wd,
                 dmem_be, e_be, dmem_addr, addr);
    end

    // observed register state, from the processor's own writes
    if (rf_we && rf_waddr != 0) obs_r[rf_waddr] = rf_wdata;

    // advance the model
    if (e_we && e_wa != 0) m_r[e_wa] = wd;
    for (int l = 0; l < 4; l++) begin
      if (e_be[l]) begin
        if (op == 6'h28) m_mem[bidx(addr)] = rt_v[7:0];
        else             m_mem[bidx({addr[31:2], 2'(l)})] = rt_v[8*l +: 8];
      end
    end
    m_pc  = m_npc;
    m_npc = nxt;
  endtask

  task automatic model_reset();
    m_pc = 0; m_npc = 4;
    foreach (m_r[i]) m_r[i] = 0;
    foreach (obs_r[i]) obs_r[i] = 0;
  endtask

  task automatic run(int cycles);
    for (int c = 0; c < cycles; c++) begin
      step_and_check();
      @(negedge clk);
    end
  endtask

  task automatic expect_reg(int r, logic [31:0] v);
    checks++;
    if (obs_r[r] !== v) begin
      failures++;
      $display("FAIL directed r%0d = %h, expected %h", r, obs_r[r], v);
    end
  endtask

  // ---------------- random instruction generator ----------------
  function automatic int pick_reg();
    int k;
    k = $urandom_range(9);
    return (k == 9) ? 31 : k;   // a few registers, so that operands often match
  endfunction

  function automatic logic [31:0] rand_instr(int here);
    int rs, rt, rd;
    rs = pick_reg(); rt = pick_reg(); rd = pick_reg();
    case ($urandom_range(17))
      0:  return enc_r(rs, rt, rd, FN_ADD);
      1:  return enc_r(rs, rt, rd, FN_SUB);
      2:  return enc_r(rs, rt, rd, FN_OR);
      3:  return enc_r(rs, rt, rd, FN_SLT);
      4:  return enc_r(rs, 0, 0, FN_JR);
      5:  return enc_r(rs, 0, rd, FN_JALR);
      6, 16: return enc_i(OP_ADDI, rs, rt, $urandom_range(64) - 32);
      7:  return enc_i(OP_SLTI, rs, rt, $urandom_range(64) - 32);
      8:  return enc_i(OP_LW, rs, rt, $urandom_range(64) - 32);
      9, 17: return enc_i(OP_LB, rs, rt, $urandom_range(64) - 32);
      10: return enc_i(OP_SW, rs, rt, $urandom_range(64) - 32);
      11: return enc_i(OP_SB, rs, rt, $urandom_range(64) - 32);
      // forward branches and jumps only, so that a program rarely traps
      // itself in a short loop
      12: return enc_i(OP_BEQ, rs, rt, $urandom_range(8));
      13: return enc_i(OP_BNE, rs, rt, $urandom_range(8));
      14: return enc_j($urandom_range(1) ? OP_J : OP_JAL,
                   (32'(here) + 4 * $urandom_range(1, 16)) & 32'h0000_0ffc);
      default: return 32'($urandom);   // anything, mostly undefined encodings
    endcase
  endfunction

  // ---------------- stimulus ----------------
  initial begin
    int a, p, loop_top, halt;
    imem_load_we = 0; imem_load_addr = 0; imem_load_data = 0;
    foreach (cov[i]) cov[i] = 0;
    foreach (m_mem[i]) m_mem[i] = 0;

    // ---- phase 1: directed program ----
    ppos = 0;
    foreach (prog[i]) prog[i] = NOP;
    // clear the data memory: r1 walks over every word
    a = emit(enc_i(OP_ADDI, 0, 1, 0));
    loop_top = emit(enc_i(OP_SW, 1, 0, 0));
    a = emit(enc_i(OP_ADDI, 1, 1, 4));
    a = emit(enc_i(OP_SLTI, 1, 2, DW * 4));
    a = emit(enc_i(OP_BNE, 2, 0, (loop_top - (a + 8)) / 4));  // back to loop_top
    a = emit(NOP);                                           // delay slot
    // arithmetic and logic
    a = emit(enc_i(OP_ADDI, 0, 2, 5));          // r2 = 5
    a = emit(enc_i(OP_ADDI, 0, 3, 7));          // r3 = 7
    a = emit(enc_r(2, 3, 1, FN_ADD));           // r1 = 12
    a = emit(enc_r(2, 3, 4, FN_SUB));           // r4 = -2
    a = emit(enc_r(2, 3, 9, FN_OR));            // r9 = 7
    a = emit(enc_r(4, 2, 5, FN_SLT));           // r5 = (-2 < 5) = 1
    a = emit(enc_i(OP_SLTI, 2, 6, -1));         // r6 = (5 < -1) = 0
    // memory
    a = emit(enc_i(OP_ADDI, 0, 8, 'h100));      // r8 = 0x100
    a = emit(enc_i(OP_SW, 8, 4, 8));            // [0x108] = fffffffe
    a = emit(enc_i(OP_ADDI, 0, 10, 'hab));      // r10 = 0xab
    a = emit(enc_i(OP_SB, 8, 10, 9));           // byte 0x109 = ab
    a = emit(enc_i(OP_LW, 8, 11, 8));           // r11 = ffffabfe
    a = emit(enc_i(OP_LB, 8, 12, 9));           // r12 = 000000ab
    a = emit(enc_i(OP_LB, 8, 13, 11));          // r13 = 000000ff
    a = emit(enc_i(OP_LB, 8, 7, 8));            // r7  = 000000fe
    // branches: offset 2 skips one instruction after the delay slot
    a = emit(enc_i(OP_BEQ, 2, 3, 2));           // 5 != 7: not taken
    a = emit(enc_i(OP_ADDI, 0, 14, 1));         // r14 = 1
    a = emit(enc_i(OP_BEQ, 9, 3, 2));           // 7 == 7: taken
    a = emit(enc_i(OP_ADDI, 0, 15, 1));         // delay slot: r15 = 1
    a = emit(enc_i(OP_ADDI, 0, 16, 1));         // skipped: r16 stays 0
    a = emit(enc_i(OP_ADDI, 0, 17, 1));         // target: r17 = 1
    a = emit(enc_i(OP_BNE, 2, 3, 2));           // taken
    a = emit(enc_i(OP_ADDI, 0, 18, 1));         // delay slot: r18 = 1
    a = emit(enc_i(OP_ADDI, 0, 19, 1));         // skipped
    a = emit(enc_i(OP_ADDI, 0, 20, 1));         // target: r20 = 1
    // calls: layout relative to p
    p = ppos * 4;
    a = emit(enc_j(OP_JAL, p + 40));            // p+0:  jal F, r31 = p+8
    a = emit(enc_i(OP_ADDI, 0, 21, 1));         // p+4:  delay slot
    a = emit(enc_i(OP_ADDI, 0, 26, 1));         // p+8:  return lands here
    a = emit(enc_i(OP_ADDI, 0, 24, p + 28));    // p+12: r24 = G
    a = emit(enc_r(24, 0, 23, FN_JALR));        // p+16: jalr r23, r24: r23 = p+24
    a = emit(enc_i(OP_ADDI, 0, 27, 1));         // p+20: delay slot
    a = emit(enc_i(OP_ADDI, 0, 25, 1));         // p+24: skipped
    a = emit(enc_i(OP_ADDI, 0, 28, 1));         // p+28: G
    halt = emit(enc_j(OP_J, p + 32));           // p+32: halt loop
    a = emit(NOP);                              // p+36
    a = emit(enc_r(31, 0, 0, FN_JR));           // p+40: F: jr r31
    a = emit(enc_i(OP_ADDI, 0, 22, 1));         // p+44: delay slot

    rst_n = 0;
    @(negedge clk);
    load_program();
    @(negedge clk);
    rst_n = 1;
    model_reset();
    run(DW * 5 + 200);   // five instructions per cleared word

    checks++;
    if (pc !== halt && pc !== halt + 4) begin failures++; $display("FAIL not halted, pc=%h", pc); end
    expect_reg(1, 12);          expect_reg(4, 32'hffff_fffe); expect_reg(9, 7);
    expect_reg(5, 1);           expect_reg(6, 0);
    expect_reg(11, 32'hffff_abfe); expect_reg(12, 32'h0000_00ab);
    expect_reg(13, 32'h0000_00ff); expect_reg(7, 32'h0000_00fe);
    expect_reg(14, 1); expect_reg(15, 1); expect_reg(16, 0); expect_reg(17, 1);
    expect_reg(18, 1); expect_reg(19, 0); expect_reg(20, 1);
    expect_reg(21, 1); expect_reg(22, 1); expect_reg(26, 1); expect_reg(27, 1);
    expect_reg(25, 0); expect_reg(28, 1);
    expect_reg(31, p + 8); expect_reg(23, p + 24);
    $display("phase 1 done: checks=%0d failures=%0d", checks, failures);

    // ---- phase 2: random programs over the whole instruction memory ----
    // The data memory is not cleared by reset, so the model keeps its copy.
    for (int e = 0; e < EPISODES; e++) begin
      foreach (prog[i]) prog[i] = rand_instr(i * 4);
      rst_n = 0;
      load_program();
      @(negedge clk);
      rst_n = 1;
      model_reset();
      run(RAND_CYCLES);
    end

    for (int k = 0; k < K_COUNT; k++) begin
      $display("  %-8s %0d", kind_e'(k), cov[k]);
      checks++;
      if (cov[k] == 0) begin
        failures++;
        $display("FAIL mechanism %s never exercised", kind_e'(k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
