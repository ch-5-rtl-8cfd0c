// mips_examples_tb: runs the chapter's example instructions, with their
// register numbers and immediates, through the processor.
//
// The processor is built with RESET_PC = 0x10000000 and a 16384-word
// instruction memory so that the jump example "j 0x2000" executed at a PC of
// 0x1000_xxxx lands on 0x10008000, and the jump and call targets 0x1000,
// 0xc000 and 0x2000 are distinct words (the call uses target field 0x3000
// rather than the chapter's 0x2000, whose address 0x8000 would share a
// memory word with 0x10008000). A few ADDI instructions set up
// operands first. The testbench records every register write and every
// data-memory write the processor makes, in order, and compares them with
// lists of hand-computed values; it also checks that the PC reaches
// 0x10008000 after the J and ends in the final halt loop.
module mips_examples_tb;
  import mips_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        imem_load_we = 0;
  logic [31:0] imem_load_addr = 0, imem_load_data = 0;
  logic [31:0] pc, npc, instr;
  logic        rf_we;
  logic [4:0]  rf_waddr;
  logic [31:0] rf_wdata;
  logic [3:0]  dmem_be;
  logic [31:0] dmem_addr, dmem_wdata;

  mips_single_cycle #(.IMEM_WORDS(16384), .RESET_PC(32'h1000_0000)) dut (
    .clk(clk), .rst_n(rst_n),
    .imem_load_we(imem_load_we), .imem_load_addr(imem_load_addr),
    .imem_load_data(imem_load_data),
    .pc(pc), .npc(npc), .instr(instr),
    .rf_we(rf_we), .rf_waddr(rf_waddr), .rf_wdata(rf_wdata),
    .dmem_be(dmem_be), .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] r_ins(int rs, int rt, int rd, logic [5:0] fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] i_ins(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] j_ins(logic [5:0] op, int field);
    return {op, 26'(field)};
  endfunction
  localparam logic [31:0] NOP = 32'h0000_0020;

  // program placement
  logic [31:0] addr_q;
  task automatic put(logic [31:0] w);
    imem_load_we = 1; imem_load_addr = addr_q; imem_load_data = w;
    @(negedge clk);
    imem_load_we = 0;
    addr_q += 4;
  endtask

  // observed events
  typedef struct { logic [4:0] a; logic [31:0] d; } rw_t;
  typedef struct { logic [31:0] a; logic [3:0] be; logic [31:0] d; } mw_t;
  rw_t rw_q[$];
  mw_t mw_q[$];
  bit  saw_jump_target = 0;

  always @(negedge clk) if (rst_n) begin
    if (rf_we && rf_waddr != 0) rw_q.push_back('{rf_waddr, rf_wdata});
    if (dmem_be != 0) mw_q.push_back('{dmem_addr, dmem_be, dmem_wdata});
    if (pc == 32'h1000_8000) saw_jump_target = 1;
  end

  task automatic expect_rw(int k, int a, logic [31:0] d);
    checks++;
    if (k >= rw_q.size() || rw_q[k].a != 5'(a) || rw_q[k].d != d) begin
      failures++;
      if (k < rw_q.size())
        $display("FAIL write %0d: r%0d=%h, expected r%0d=%h", k, rw_q[k].a, rw_q[k].d, a, d);
      else
        $display("FAIL write %0d missing, expected r%0d=%h", k, a, d);
    end
  endtask

  initial begin
    int k;
    logic [31:0] bne_at;
    rst_n = 0;
    @(negedge clk);
    addr_q = 32'h1000_0000;
    // operands
    put(i_ins(OP_ADDI, 0, 2, 7));
    put(i_ins(OP_ADDI, 0, 3, 5));
    put(i_ins(OP_ADDI, 0, 5, 20));
    put(i_ins(OP_ADDI, 0, 6, 8));
    put(i_ins(OP_ADDI, 0, 8, -9));
    put(i_ins(OP_ADDI, 0, 10, 'h0c));
    put(i_ins(OP_ADDI, 0, 11, 'h30));
    put(i_ins(OP_ADDI, 0, 12, 'h39));
    // the chapter's examples
    put(r_ins(2, 3, 1, 6'h20));            // ADD  R1, R2, R3
    put(r_ins(5, 6, 4, 6'h22));            // SUB  R4, R5, R6
    put(i_ins(6'h08, 8, 7, 5));            // ADDI R7, R8, 5
    put(r_ins(10, 11, 9, 6'h25));          // OR   R9, R10, R11
    put(i_ins(6'h2b, 12, 10, 11));         // SW   R10, 11(R12)
    put(i_ins(6'h23, 9, 7, 8));            // LW   R7, 8(R9)
    put(i_ins(OP_ADDI, 0, 10, 'h5a));
    put(i_ins(6'h28, 12, 10, 11));         // SB   R10, 11(R12)
    put(i_ins(OP_ADDI, 0, 3, 'h42));
    put(i_ins(6'h20, 3, 1, 2));            // LB   R1, 2(R3)
    put(r_ins(2, 3, 1, 6'h2a));            // SLT  R1, R2, R3
    put(i_ins(6'h0a, 5, 4, 6));            // SLTI R4, R5, 6
    put(i_ins(6'h04, 10, 11, 12));         // BEQ  R10, R11, 12 (not taken)
    put(i_ins(OP_ADDI, 0, 14, 1));
    bne_at = addr_q;
    put(i_ins(6'h05, 10, 11, 12));         // BNE  R10, R11, 12 (taken)
    put(i_ins(OP_ADDI, 0, 15, 1));         // delay slot
    for (int i = 0; i < 11; i++) put(i_ins(OP_ADDI, 0, 16, 1));  // skipped
    if (addr_q != bne_at + 4 + 48) $display("layout error");
    put(j_ins(6'h02, 'h2000));             // J 0x2000 -> 0x10008000
    put(i_ins(OP_ADDI, 0, 17, 1));         // delay slot
    addr_q = 32'h1000_8000;
    put(i_ins(OP_ADDI, 0, 10, 'h1000));
    put(r_ins(10, 0, 0, 6'h08));           // JR R10 -> 0x1000
    put(i_ins(OP_ADDI, 0, 18, 1));         // delay slot
    addr_q = 32'h0000_1000;
    put(j_ins(6'h03, 'h3000));             // JAL 0x3000 -> 0xc000, R31 = 0x1008
    put(i_ins(OP_ADDI, 0, 19, 1));         // delay slot
    put(i_ins(OP_ADDI, 0, 21, 1));         // not reached
    addr_q = 32'h0000_c000;
    put(i_ins(OP_ADDI, 0, 10, 'h2000));
    put(r_ins(10, 0, 11, 6'h09));          // JALR R10, R11 -> 0x2000, R11 = 0xc00c
    put(i_ins(OP_ADDI, 0, 20, 1));         // delay slot
    addr_q = 32'h0000_2000;
    put(j_ins(6'h02, 'h800));              // halt: j 0x2000
    put(NOP);

    @(negedge clk);
    rst_n = 1;
    repeat (60) @(negedge clk);

    k = 0;
    expect_rw(k++, 2, 7);   expect_rw(k++, 3, 5);   expect_rw(k++, 5, 20);
    expect_rw(k++, 6, 8);   expect_rw(k++, 8, 32'hffff_fff7);
    expect_rw(k++, 10, 'h0c); expect_rw(k++, 11, 'h30); expect_rw(k++, 12, 'h39);
    expect_rw(k++, 1, 12);                  // ADD
    expect_rw(k++, 4, 12);                  // SUB
    expect_rw(k++, 7, 32'hffff_fffc);       // ADDI
    expect_rw(k++, 9, 'h3c);                // OR
    expect_rw(k++, 7, 'h0c);                // LW of the word SW stored
    expect_rw(k++, 10, 'h5a);
    expect_rw(k++, 3, 'h42);
    expect_rw(k++, 1, 'h5a);                // LB of the byte SB stored
    expect_rw(k++, 1, 1);                   // SLT 7 < 0x42
    expect_rw(k++, 4, 0);                   // SLTI 20 < 6
    expect_rw(k++, 14, 1);
    expect_rw(k++, 15, 1);                  // BNE delay slot
    expect_rw(k++, 17, 1);                  // J delay slot
    expect_rw(k++, 10, 'h1000);
    expect_rw(k++, 18, 1);                  // JR delay slot
    expect_rw(k++, 31, 'h1008);             // JAL link, PC + 8
    expect_rw(k++, 19, 1);                  // JAL delay slot
    expect_rw(k++, 10, 'h2000);
    expect_rw(k++, 11, 'hc00c);             // JALR link into Rd
    expect_rw(k++, 20, 1);                  // JALR delay slot
    checks++;
    if (rw_q.size() != k) begin
      failures++;
      $display("FAIL %0d register writes, expected %0d", rw_q.size(), k);
    end

    checks++;
    if (mw_q.size() != 2 ||
        mw_q[0].a != 32'h44 || mw_q[0].be != 4'hf || mw_q[0].d != 32'h0c ||
        mw_q[1].a != 32'h44 || mw_q[1].be != 4'h1 || mw_q[1].d[7:0] != 8'h5a) begin
      failures++;
      $display("FAIL memory writes: %p", mw_q);
    end

    checks++;
    if (!saw_jump_target) begin failures++; $display("FAIL j 0x2000 never reached 0x10008000"); end
    checks++;
    if (pc != 32'h2000 && pc != 32'h2004) begin failures++; $display("FAIL final pc %h", pc); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
